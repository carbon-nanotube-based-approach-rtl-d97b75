// Self-checking testbench for prefix_tree.
//
// Each trit position gets a valid per-position outcome (greater, equal or
// less, i.e. (g,e) = (1,0), (0,1) or (0,0)). The expected result is found by
// scanning from the most significant position for the first one that is not
// equal. Four tree sizes are checked: the default N = 16 (four levels, true
// polarity at the root), N = 2 and N = 8 (odd level count, output inverter)
// and N = 5 (padded to 8).
module tb_prefix_tree;
  localparam int NMAX = 16;

  int checks = 0;
  int failures = 0;

  logic [NMAX-1:0] g, e;
  logic gt16, eq16, gt8, eq8, gt5, eq5, gt2, eq2;

  prefix_tree           dut16 (.g(g),      .e(e),      .gt(gt16), .eq(eq16));
  prefix_tree #(.N(8))  dut8  (.g(g[7:0]), .e(e[7:0]), .gt(gt8),  .eq(eq8));
  prefix_tree #(.N(5))  dut5  (.g(g[4:0]), .e(e[4:0]), .gt(gt5),  .eq(eq5));
  prefix_tree #(.N(2))  dut2  (.g(g[1:0]), .e(e[1:0]), .gt(gt2),  .eq(eq2));

  // Reference: result over positions n-1 .. 0, as {gt, eq}.
  function automatic logic [1:0] ref_ge(input logic [NMAX-1:0] gv,
                                        input logic [NMAX-1:0] ev, input int n);
    for (int i = n - 1; i >= 0; i--) begin
      if (gv[i]) return 2'b10;
      if (!ev[i]) return 2'b00;
    end
    return 2'b01;
  endfunction

  task automatic check(input string name, input logic [1:0] got, input logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s g=%h e=%h got {gt,eq}=%b expected %b", name, g, e, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      // Bias towards long runs of equal positions so deep decisions occur.
      int cut;
      cut = $urandom_range(NMAX, 0);
      for (int i = 0; i < NMAX; i++) begin
        int kind;
        kind = (i >= cut) ? 1 : int'($urandom_range(2, 0));
        g[i] = (kind == 0);
        e[i] = (kind == 1);
      end
      #1;
      check("N16", {gt16, eq16}, ref_ge(g, e, 16));
      check("N8",  {gt8,  eq8},  ref_ge(g, e, 8));
      check("N5",  {gt5,  eq5},  ref_ge(g, e, 5));
      check("N2",  {gt2,  eq2},  ref_ge(g, e, 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
