// tb_ipm_workloads: the solver at its default size (45 variables,
// 128 constraints, IEEE single precision, mu < 1e-5) on the problem sizes
// the design is evaluated with:
//   3 variables,  32 constraints   aircraft controller (Nu = 3, m = 1)
//   6 variables,  32 constraints   hardware-in-the-loop accuracy suite
//   45 variables, 128 constraints  largest controller, the default size
// Each is a random strictly convex QP (tb_qp_pkg). The solution must agree
// within 1e-3 with a double precision reference run with the same stopping
// rule, the solver must report convergence, and the cycle count must not
// exceed the clock cycles reported for the same size on the original
// implementation (171,460 for the aircraft size, 65,966,362 for 45 x 128);
// the 6 x 32 case is bounded by the 0.5 s sampling period at 28 MHz.
// The hardware-in-the-loop suite is then repeated in full: 50 random 6 x 32
// QPs, each held to 1e-3 as above. How many of them are also within 1e-3 of
// the exact optimum is printed; that figure depends on the stopping
// threshold rather than on the hardware, so it is reported, not checked.
module tb_ipm_workloads;
  import mpc_pkg::*;
  import tb_fp_pkg::*;
  import tb_qp_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        ld_en, start, busy, done, converged;
  mem_sel_e    ld_sel;
  logic [7:0]  ld_row, mc;
  logic [5:0]  ld_col, n, u_idx;
  logic [31:0] ld_data, u_data;
  logic [5:0]  iterations;

  ipm_solver dut (
    .clk, .rst_n, .ld_en, .ld_sel, .ld_row, .ld_col, .ld_data, .n, .mc, .start,
    .busy, .done, .converged, .iterations, .u_idx, .u_data);

  initial begin
    repeat (60000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  qp_t p;
  real u_ref [MAXN];
  real u_opt [MAXN];
  int  within_opt = 0;
  int  suite_cycles_max = 0;

  task automatic load(mem_sel_e sel, int r, int c_, real v);
    @(negedge clk);
    ld_en = 1'b1; ld_sel = sel; ld_row = 8'(r); ld_col = 6'(c_);
    ld_data = real_to_fp(v, 8, 23)[31:0];
  endtask

  task automatic run_case(int nn, int mm, int max_cycles, string name, bit quiet);
    int  cycles, act;
    real err, err_opt, e;
    make_qp(p, nn, mm, 5.0, 8, 23);
    void'(solve_ref(p, u_ref, 1e-5));
    act = solve_ref(p, u_opt, 1e-12);
    for (int i = 0; i < nn; i++)
      for (int j = 0; j < nn; j++) load(SEL_Q, i, j, p.Q[i][j]);
    for (int i = 0; i < nn; i++) load(SEL_C, i, 0, p.c[i]);
    for (int r = 0; r < mm; r++)
      for (int j = 0; j < nn; j++) load(SEL_J, r, j, p.J[r][j]);
    for (int r = 0; r < mm; r++) load(SEL_G, r, 0, p.g[r]);
    @(negedge clk);
    ld_en = 1'b0; n = 6'(nn); mc = 8'(mm); start = 1'b1;
    @(negedge clk); start = 1'b0; cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    err = 0.0; err_opt = 0.0;
    for (int i = 0; i < nn; i++) begin
      u_idx = 6'(i); #1;
      e = fp_to_real(64'(u_data), 8, 23) - u_ref[i];
      if (e < 0.0) e = -e;
      if (e > err) err = e;
      e = fp_to_real(64'(u_data), 8, 23) - u_opt[i];
      if (e < 0.0) e = -e;
      if (e > err_opt) err_opt = e;
    end
    checks++;
    if (err > 1e-3) begin
      failures++; $display("FAIL %s: max |u - u_ref| = %g", name, err);
    end
    checks++;
    if (!converged) begin failures++; $display("FAIL %s: not converged", name); end
    checks++;
    if (cycles > max_cycles) begin
      failures++; $display("FAIL %s: %0d cycles, bound %0d", name, cycles, max_cycles);
    end
    if (err_opt <= 1e-3) within_opt++;
    if (cycles > suite_cycles_max) suite_cycles_max = cycles;
    if (!quiet)
      $display("%s (n=%0d mc=%0d): %0d active, %0d iterations, %0d cycles (bound %0d), error %g, to optimum %g",
             name, nn, mm, act, iterations, cycles, max_cycles, err, err_opt);
  endtask

  initial begin
    ld_en = 0; start = 0; ld_sel = SEL_Q; ld_row = 0; ld_col = 0; ld_data = 0;
    n = 0; mc = 0; u_idx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_case(3, 32, 171460, "aircraft", 1'b0);
    run_case(6, 32, 14000000, "test suite", 1'b0);
    run_case(45, 128, 65966362, "largest", 1'b0);
    within_opt = 0; suite_cycles_max = 0;
    for (int q = 0; q < 50; q++) run_case(6, 32, 14000000, $sformatf("suite QP %0d", q), 1'b1);
    $display("suite: 50 QPs of 6 x 32, %0d within 1e-3 of the exact optimum, at most %0d cycles each",
             within_opt, suite_cycles_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
