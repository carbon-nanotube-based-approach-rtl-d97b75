// End-to-end testbench for ternary_comparator at its default size (N = 16).
//
// Operands are random base-3 numbers, generated so that long runs of equal
// leading trits are common, plus directed corner cases (all zeros, all twos,
// difference in the least significant trit only). The expected result comes
// from comparing the integer values of the operands. It also counts how
// often each outcome (greater, equal, less) occurred and how often the
// decision fell at the most significant and at the least significant trit;
// each of these must happen at least once.
module tb_ternary_comparator;
  import ternary_pkg::*;

  localparam int N = 16;

  trit_t [N-1:0] a, b;
  logic gt, eq, lt;

  int checks = 0;
  int failures = 0;
  int n_gt = 0, n_eq = 0, n_lt = 0, n_msb = 0, n_lsb = 0;

  ternary_comparator dut (.a(a), .b(b), .gt(gt), .eq(eq), .lt(lt));

  function automatic longint value(input trit_t [N-1:0] t);
    longint v = 0;
    for (int i = N - 1; i >= 0; i--) v = v * 3 + longint'(t[i]);
    return v;
  endfunction

  // Most significant position where the operands differ, -1 if none.
  function automatic int first_diff(input trit_t [N-1:0] x, input trit_t [N-1:0] y);
    for (int i = N - 1; i >= 0; i--) if (x[i] != y[i]) return i;
    return -1;
  endfunction

  task automatic apply_and_check();
    longint va, vb;
    int d;
    #1;
    va = value(a);
    vb = value(b);
    checks++;
    if ({gt, eq, lt} !== {va > vb, va == vb, va < vb}) begin
      failures++;
      $display("FAIL A=%0d B=%0d got gt=%b eq=%b lt=%b", va, vb, gt, eq, lt);
    end
    if (va > vb) n_gt++;
    if (va == vb) n_eq++;
    if (va < vb) n_lt++;
    d = first_diff(a, b);
    if (d == N - 1) n_msb++;
    if (d == 0) n_lsb++;
  endtask

  task automatic mech(input string name, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end
    $display("%-28s %0d", name, count);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed cases.
    a = '{default: T0}; b = '{default: T0}; apply_and_check();
    a = '{default: T2}; b = '{default: T2}; apply_and_check();
    a = '{default: T2}; b = '{default: T0}; apply_and_check();
    a = '{default: T0}; b = '{default: T2}; apply_and_check();
    a = '{default: T1}; b = '{default: T1}; a[0] = T2; apply_and_check();
    a = '{default: T1}; b = '{default: T1}; b[0] = T2; apply_and_check();
    a = '{default: T1}; b = '{default: T1}; a[N-1] = T0; b[0] = T0; apply_and_check();

    // Random cases: above a random cut both operands share their trits.
    for (int t = 0; t < 20000; t++) begin
      int cut;
      cut = $urandom_range(N, 0);
      for (int i = 0; i < N; i++) begin
        a[i] = trit_t'($urandom_range(2, 0));
        b[i] = (i >= cut) ? a[i] : trit_t'($urandom_range(2, 0));
      end
      apply_and_check();
    end

    mech("outcome greater", n_gt);
    mech("outcome equal", n_eq);
    mech("outcome less", n_lt);
    mech("decided at top trit", n_msb);
    mech("decided at bottom trit", n_lsb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
