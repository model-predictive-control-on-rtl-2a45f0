// tb_ipm_solver: self-checking test of the interior point QP solver.
//
// Random strictly convex QPs (tb_qp_pkg) are loaded into a solver built for
// n <= 6 and mc <= 32, solved, and the solution compared with a double
// precision reference that solves the full Newton system. As in the
// accuracy test of the design, a solution passes when every entry of u is
// within 1e-3 of the reference. Sizes run: n = 3, mc = 32 (the aircraft
// controller), n = 6, mc = 32, and n = 1, mc = 2. Also checked: the
// converged flag, and that a run of the aircraft size takes fewer cycles
// than its 0.5 s sampling period at a 28 MHz clock (14,000,000 cycles),
// that a solver with an iteration limit of 3 stops there unconverged, and
// that a solver in the reduced (9,18) format solves an aircraft-size QP to
// within 1e-3 of a reference using the same stopping rule (mu < 1e-5).
module tb_ipm_solver;
  import mpc_pkg::*;
  import tb_fp_pkg::*;
  import tb_qp_pkg::*;

  localparam int NU = 6;
  localparam int MC = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        ld_en, start, busy, done, converged;
  mem_sel_e    ld_sel;
  logic [5:0]  ld_row, mc;
  logic [2:0]  ld_col, n, u_idx;
  logic [31:0] ld_data, u_data;
  logic [5:0]  iterations;

  ipm_solver #(.NU(NU), .MC(MC), .EPS_MU(1.0e-6)) dut (
    .clk, .rst_n, .ld_en, .ld_sel, .ld_row, .ld_col, .ld_data, .n, .mc, .start,
    .busy, .done, .converged, .iterations, .u_idx, .u_data);

  // second solver with a small iteration limit
  logic        l_start, l_done, l_converged;
  logic [1:0]  l_iterations;
  logic [31:0] l_u_data;
  ipm_solver #(.NU(NU), .MC(MC), .MAX_ITER(3)) dut_lim (
    .clk, .rst_n, .ld_en, .ld_sel, .ld_row, .ld_col, .ld_data, .n, .mc, .start(l_start),
    .busy(), .done(l_done), .converged(l_converged), .iterations(l_iterations), .u_idx,
    .u_data(l_u_data));

  // third solver in the reduced (9,18) format, default stopping rule
  logic        h_ld_en, h_start, h_done, h_converged;
  logic [27:0] h_ld_data, h_u_data;
  logic [5:0]  h_iterations;
  ipm_solver #(.EXP_W(9), .MAN_W(18), .NU(NU), .MC(MC)) dut_h (
    .clk, .rst_n, .ld_en(h_ld_en), .ld_sel, .ld_row, .ld_col, .ld_data(h_ld_data), .n, .mc,
    .start(h_start), .busy(), .done(h_done), .converged(h_converged),
    .iterations(h_iterations), .u_idx, .u_data(h_u_data));

  task automatic load_h(mem_sel_e sel, int r, int c_, real v);
    @(negedge clk);
    h_ld_en = 1'b1; ld_sel = sel; ld_row = 6'(r); ld_col = 3'(c_);
    h_ld_data = real_to_fp(v, 9, 18)[27:0];
  endtask

  // aircraft-size problem in the (9,18) format, compared with a reference
  // run with the same stopping rule
  task automatic run_reduced();
    real err, e;
    make_qp(p, 3, 32, 5.0, 9, 18);
    void'(solve_ref(p, u_ref, 1e-5));
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) load_h(SEL_Q, i, j, p.Q[i][j]);
    for (int i = 0; i < 3; i++) load_h(SEL_C, i, 0, p.c[i]);
    for (int r = 0; r < 32; r++)
      for (int j = 0; j < 3; j++) load_h(SEL_J, r, j, p.J[r][j]);
    for (int r = 0; r < 32; r++) load_h(SEL_G, r, 0, p.g[r]);
    @(negedge clk);
    h_ld_en = 1'b0; n = 3'd3; mc = 6'd32; h_start = 1'b1;
    @(negedge clk); h_start = 1'b0;
    while (!h_done) @(negedge clk);
    err = 0.0;
    for (int i = 0; i < 3; i++) begin
      u_idx = 3'(i); #1;
      e = fp_to_real(64'(h_u_data), 9, 18) - u_ref[i];
      if (e < 0.0) e = -e;
      if (e > err) err = e;
    end
    checks++;
    if (err > 1e-3 || !h_converged) begin
      failures++; $display("FAIL (9,18) format: error %g, converged %0d", err, h_converged);
    end
    $display("(9,18) n=3 mc=32: %0d iterations, max error %g", h_iterations, err);
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  qp_t p;
  real u_ref [MAXN];

  task automatic load(mem_sel_e sel, int r, int c_, real v);
    @(negedge clk);
    ld_en = 1'b1; ld_sel = sel; ld_row = 6'(r); ld_col = 3'(c_);
    ld_data = real_to_fp(v, 8, 23)[31:0];
  endtask

  task automatic run_case(int nn, int mm, real cs);
    int  cycles, act;
    real err, e;
    make_qp(p, nn, mm, cs, 8, 23);
    act = solve_ref(p, u_ref, 1e-12);
    for (int i = 0; i < nn; i++)
      for (int j = 0; j < nn; j++) load(SEL_Q, i, j, p.Q[i][j]);
    for (int i = 0; i < nn; i++) load(SEL_C, i, 0, p.c[i]);
    for (int r = 0; r < mm; r++)
      for (int j = 0; j < nn; j++) load(SEL_J, r, j, p.J[r][j]);
    for (int r = 0; r < mm; r++) load(SEL_G, r, 0, p.g[r]);
    @(negedge clk);
    ld_en = 1'b0; n = 3'(nn); mc = 6'(mm); start = 1'b1;
    @(negedge clk); start = 1'b0; cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    err = 0.0;
    for (int i = 0; i < nn; i++) begin
      u_idx = 3'(i); #1;
      e = fp_to_real(64'(u_data), 8, 23) - u_ref[i];
      if (e < 0.0) e = -e;
      if (e > err) err = e;
    end
    checks++;
    if (err > 1e-3) begin
      failures++;
      $display("FAIL n=%0d mc=%0d: max |u - u_ref| = %g", nn, mm, err);
    end
    checks++;
    if (!converged) begin
      failures++;
      $display("FAIL n=%0d mc=%0d: not converged", nn, mm);
    end
    if (nn == 3 && mm == 32) begin
      checks++;
      if (cycles >= 14000000) begin
        failures++;
        $display("FAIL aircraft size: %0d cycles exceed the sampling period", cycles);
      end
    end
    $display("n=%0d mc=%0d: %0d active, %0d iterations, %0d cycles, max error %g",
             nn, mm, act, iterations, cycles, err);
  endtask

  initial begin
    ld_en = 0; start = 0; l_start = 0; h_ld_en = 0; h_start = 0; h_ld_data = 0; ld_sel = SEL_Q; ld_row = 0; ld_col = 0; ld_data = 0;
    n = 0; mc = 0; u_idx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_case(3, 32, 5.0);
    run_case(6, 32, 5.0);
    run_case(6, 32, 0.2);
    run_case(1, 2, 3.0);
    run_case(3, 32, 2.0);
    // the last problem is also loaded into the limited solver: it must stop
    // after 3 iterations without reporting convergence
    @(negedge clk); l_start = 1'b1; @(negedge clk); l_start = 1'b0;
    while (!l_done) @(negedge clk);
    checks++;
    if (l_converged || l_iterations != 2'd3) begin
      failures++; $display("FAIL iteration limit: converged=%0d iterations=%0d", l_converged, l_iterations);
    end
    run_reduced();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
