// Self-checking testbench for ge_gen: drives all nine pairs of one-hot
// decoded operands and checks g = (A > B) and e = (A = B).
module tb_ge_gen;
  logic [2:0] ak, bk;
  logic g, e;
  int checks = 0;
  int failures = 0;

  ge_gen dut (.ak(ak), .bk(bk), .g(g), .e(e));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 3; a++) begin
      for (int b = 0; b < 3; b++) begin
        ak = 3'(1 << a);
        bk = 3'(1 << b);
        #1;
        checks += 2;
        if (g !== (a > b)) begin
          failures++;
          $display("FAIL A=%0d B=%0d g=%b", a, b, g);
        end
        if (e !== (a == b)) begin
          failures++;
          $display("FAIL A=%0d B=%0d e=%b", a, b, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
