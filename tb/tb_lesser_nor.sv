// Self-checking testbench for lesser_nor: all four input combinations.
module tb_lesser_nor;
  logic gt, eq, lt;
  int checks = 0;
  int failures = 0;

  lesser_nor dut (.gt(gt), .eq(eq), .lt(lt));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {gt, eq} = 2'(v);
      #1;
      checks++;
      if (lt !== (v == 0)) begin
        failures++;
        $display("FAIL gt=%b eq=%b lt=%b", gt, eq, lt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
