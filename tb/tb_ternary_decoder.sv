// Self-checking testbench for ternary_decoder: for each input value k the
// output line X_k must be high and the other two low.
module tb_ternary_decoder;
  import ternary_pkg::*;

  trit_t x;
  logic [2:0] xk;
  int checks = 0;
  int failures = 0;

  ternary_decoder dut (.x(x), .xk(xk));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 3; v++) begin
      x = trit_t'(v);
      #1;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (xk[k] !== (v == k)) begin
          failures++;
          $display("FAIL x=%0d X%0d=%b", v, k, xk[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
