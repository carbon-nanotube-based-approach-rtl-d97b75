// Self-checking testbench for tcmp1, the one-trit comparator: applies the
// nine input rows of the one-trit truth table and checks e_i and g_i against
// the table, written out row by row (1 = logic 2).
module tb_tcmp1;
  import ternary_pkg::*;

  trit_t a, b;
  logic g, e;
  int checks = 0;
  int failures = 0;

  // Rows in order A,B = 00 01 02 10 11 12 20 21 22.
  localparam logic [8:0] E_COL = 9'b100_010_001;
  localparam logic [8:0] G_COL = 9'b000_100_110;

  tcmp1 dut (.a(a), .b(b), .g(g), .e(e));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int row = 0; row < 9; row++) begin
      a = trit_t'(row / 3);
      b = trit_t'(row % 3);
      #1;
      checks += 2;
      if (e !== E_COL[8-row]) begin
        failures++;
        $display("FAIL A=%0d B=%0d e=%b", a, b, e);
      end
      if (g !== G_COL[8-row]) begin
        failures++;
        $display("FAIL A=%0d B=%0d g=%b", a, b, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
