// Testbench for ternary_comparator at the operand lengths of the reference
// evaluation (2, 4 and 8 trits; 16 is covered by the default-size testbench),
// plus 1 and 3 trits to exercise the degenerate and padded trees. Lengths up
// to 4 are checked exhaustively over every pair of operands; 8 trits get
// random operands with shared leading trits. The expected result is the
// comparison of the operands' integer values.
module tb_comparator_lengths;
  import ternary_pkg::*;

  localparam int NMAX = 8;

  trit_t [NMAX-1:0] a, b;
  logic [4:0] gt, eq, lt;   // one bit per instance: lengths 1, 2, 3, 4, 8
  int checks = 0;
  int failures = 0;

  ternary_comparator #(.N(1)) dut1 (.a(a[0:0]), .b(b[0:0]), .gt(gt[0]), .eq(eq[0]), .lt(lt[0]));
  ternary_comparator #(.N(2)) dut2 (.a(a[1:0]), .b(b[1:0]), .gt(gt[1]), .eq(eq[1]), .lt(lt[1]));
  ternary_comparator #(.N(3)) dut3 (.a(a[2:0]), .b(b[2:0]), .gt(gt[2]), .eq(eq[2]), .lt(lt[2]));
  ternary_comparator #(.N(4)) dut4 (.a(a[3:0]), .b(b[3:0]), .gt(gt[3]), .eq(eq[3]), .lt(lt[3]));
  ternary_comparator #(.N(8)) dut8 (.a(a[7:0]), .b(b[7:0]), .gt(gt[4]), .eq(eq[4]), .lt(lt[4]));

  localparam int LEN [5] = '{1, 2, 3, 4, 8};

  function automatic int value(input trit_t [NMAX-1:0] t, input int n);
    int v = 0;
    for (int i = n - 1; i >= 0; i--) v = v * 3 + int'(t[i]);
    return v;
  endfunction

  task automatic check(input int k);
    int va, vb;
    va = value(a, LEN[k]);
    vb = value(b, LEN[k]);
    checks++;
    if ({gt[k], eq[k], lt[k]} !== {va > vb, va == vb, va < vb}) begin
      failures++;
      $display("FAIL N=%0d A=%0d B=%0d got gt=%b eq=%b lt=%b", LEN[k], va, vb,
               gt[k], eq[k], lt[k]);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Exhaustive over 4 trits: every pair also covers lengths 1, 2 and 3.
    for (int va = 0; va < 81; va++) begin
      for (int vb = 0; vb < 81; vb++) begin
        int x, y;
        x = va;
        y = vb;
        for (int i = 0; i < NMAX; i++) begin
          a[i] = (i < 4) ? trit_t'(x % 3) : T0;
          b[i] = (i < 4) ? trit_t'(y % 3) : T0;
          x /= 3;
          y /= 3;
        end
        #1;
        for (int k = 0; k < 4; k++) check(k);
      end
    end
    // Random over 8 trits.
    for (int t = 0; t < 5000; t++) begin
      int cut;
      cut = $urandom_range(NMAX, 0);
      for (int i = 0; i < NMAX; i++) begin
        a[i] = trit_t'($urandom_range(2, 0));
        b[i] = (i >= cut) ? a[i] : trit_t'($urandom_range(2, 0));
      end
      #1;
      check(4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
