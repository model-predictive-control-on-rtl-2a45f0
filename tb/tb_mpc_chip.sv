// tb_mpc_chip: end-to-end test of the MPC chip at its default parameters
// (IEEE single precision, up to 45 variables and 128 constraints,
// 243 clocks per serial bit).
//
// Like the design's hardware-in-the-loop test suite, the testbench acts as
// the host: it generates random strictly convex QPs, sends them over the
// serial line bit by bit, reads the status byte and the solution back from
// the line, and compares u with a double precision reference (tb_qp_pkg)
// with the suite's tolerance of 1e-3. The reference is run with the same
// stopping rule (mu < 1e-5), so the comparison measures the single
// precision arithmetic; the distance to the exact optimum, which the
// stopping rule limits, must be below 1e-2. Problems: the aircraft
// controller's size (3 variables, 32 constraints), the suite's size
// (6 variables, 32 constraints), a 1 x 2 problem and the largest the chip
// holds (45 variables, 128 constraints, about 32,000 bytes on the line). A byte with a broken
// stop bit is sent first and must be flagged and ignored.
//
// Mechanisms counted, each of which must occur: serial frame error,
// matrix inversion, iterations whose step is cut short to keep lambda and
// t positive, full steps, constraints active at the solution, stop on
// convergence.
module tb_mpc_chip;
  import tb_fp_pkg::*;
  import tb_qp_pkg::*;

  localparam int CPB = 243;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic rxd = 1'b1;
  logic txd, busy, rx_frame_err;

  mpc_chip dut (.clk, .rst_n, .rxd, .txd, .busy, .rx_frame_err);

  initial begin
    repeat (150000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_frame_err = 0, n_inv = 0, n_short = 0, n_full = 0, n_active = 0;
  int n_conv = 0;
  logic [5:0] last_iter = '0;

  always @(posedge clk) if (rst_n) begin
    if (rx_frame_err) n_frame_err++;
    if (dut.u_solver.u_inv.done) n_inv++;
    // the iteration counter advances once per step; alpha holds that step
    if (dut.u_solver.iter != last_iter && dut.u_solver.iter != '0) begin
      if (fp_to_real(64'(dut.u_solver.alpha), 8, 23) < 1.0) n_short++;
      else n_full++;
    end
    last_iter = dut.u_solver.iter;
  end

  qp_t p;
  real u_ref [MAXN];
  real u_hw [MAXN];
  real u_stop [MAXN];

  // host side of the serial line
  task automatic send_byte(logic [7:0] b, logic stop);
    rxd = 1'b0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(negedge clk); end
    rxd = stop; repeat (CPB) @(negedge clk);
    rxd = 1'b1; repeat (2) @(negedge clk);
  endtask

  task automatic send_word(real v);
    logic [63:0] w;
    w = real_to_fp(v, 8, 23);
    for (int b = 0; b < 4; b++) send_byte(w[8*b +: 8], 1'b1);
  endtask

  task automatic recv_byte(output logic [7:0] b);
    while (txd !== 1'b0) @(negedge clk);
    repeat (CPB / 2) @(negedge clk);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(negedge clk); b[i] = txd; end
    repeat (CPB) @(negedge clk);
    checks++;
    if (txd !== 1'b1) begin failures++; $display("FAIL stop bit from chip"); end
  endtask

  task automatic send_problem();
    send_byte(8'(p.n), 1'b1);
    send_byte(8'(p.mc), 1'b1);
    for (int i = 0; i < p.n; i++) for (int j = 0; j < p.n; j++) send_word(p.Q[i][j]);
    for (int i = 0; i < p.n; i++) send_word(p.c[i]);
    for (int r = 0; r < p.mc; r++) for (int j = 0; j < p.n; j++) send_word(p.J[r][j]);
    for (int r = 0; r < p.mc; r++) send_word(p.g[r]);
  endtask

  task automatic read_answer(int n, output logic [7:0] status, output int cycles);
    logic [7:0] b;
    logic [31:0] w;
    cycles = 0;
    while (txd !== 1'b0) begin @(negedge clk); cycles++; end
    recv_byte(status);
    for (int i = 0; i < n; i++) begin
      for (int k = 0; k < 4; k++) begin recv_byte(b); w[8*k +: 8] = b; end
      u_hw[i] = fp_to_real(64'(w), 8, 23);
    end
  endtask

  task automatic solve_case(int nn, int mm, real cs);
    logic [7:0] status;
    int  act, cycles;
    real err, err_stop, e;
    make_qp(p, nn, mm, cs, 8, 23);
    act = solve_ref(p, u_ref, 1e-12);
    n_active += act;
    void'(solve_ref(p, u_stop, 1e-5));
    send_problem();
    read_answer(nn, status, cycles);
    err = 0.0;
    err_stop = 0.0;
    for (int i = 0; i < nn; i++) begin
      e = u_hw[i] - u_ref[i];
      if (e < 0.0) e = -e;
      if (e > err) err = e;
      e = u_hw[i] - u_stop[i];
      if (e < 0.0) e = -e;
      if (e > err_stop) err_stop = e;
    end
    checks++;
    if (err_stop > 1e-3) begin
      failures++; $display("FAIL n=%0d mc=%0d: max |u - u_stop| = %g", nn, mm, err_stop);
    end
    checks++;
    if (err > 1e-2) begin
      failures++; $display("FAIL n=%0d mc=%0d: max |u - u_opt| = %g", nn, mm, err);
    end
    checks++;
    if (!status[7]) begin
      failures++; $display("FAIL n=%0d mc=%0d: not converged", nn, mm);
    end else n_conv++;
    $display("n=%0d mc=%0d: %0d active, %0d iterations, %0d cycles from last byte to answer, error to same-rule reference %g, to optimum %g",
             nn, mm, act, status[6:0], cycles, err_stop, err);
  endtask

  initial begin
    logic [7:0] status;
    int cycles;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);

    send_byte(8'hFF, 1'b0);     // broken frame, must be dropped
    repeat (3 * CPB) @(negedge clk);

    solve_case(3, 32, 5.0);     // aircraft controller size
    solve_case(6, 32, 5.0);     // test-suite size

    solve_case(1, 2, 3.0);      // smallest problem
    solve_case(45, 128, 5.0);   // largest problem the default chip holds

    $display("mechanisms: frame errors %0d, inversions %0d, short steps %0d, full steps %0d, active constraints %0d, converged %0d",
             n_frame_err, n_inv, n_short, n_full, n_active, n_conv);
    checks++; if (n_frame_err != 1) begin failures++; $display("FAIL frame error count"); end
    checks++; if (n_inv == 0)    begin failures++; $display("FAIL no inversion"); end
    checks++; if (n_short == 0)  begin failures++; $display("FAIL no short step"); end
    checks++; if (n_full == 0)   begin failures++; $display("FAIL no full step"); end
    checks++; if (n_active == 0) begin failures++; $display("FAIL no active constraint"); end
    checks++; if (n_conv == 0)   begin failures++; $display("FAIL no convergence"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
