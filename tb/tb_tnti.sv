// Self-checking testbench for tnti: applies the three trit values and
// compares the output with the y0 column (NTI) of the ternary inverter truth table.
module tb_tnti;
  import ternary_pkg::*;

  trit_t x, y;
  int checks = 0;
  int failures = 0;

  // Expected output for inputs 0, 1, 2.
  localparam trit_t EXPECTED [3] = '{T2, T0, T0};

  tnti dut (.x(x), .y(y));

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
      checks++;
      if (y !== EXPECTED[v]) begin
        failures++;
        $display("FAIL x=%0d y=%0d expected %0d", v, y, EXPECTED[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
