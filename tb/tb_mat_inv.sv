// tb_mat_inv: self-checking test of the matrix inversion core.
//
// Loads random symmetric, diagonally dominant (hence positive definite)
// matrices, inverts them and checks in double precision that A * X is the
// identity to within 1e-4 in every entry. A small core (N = 8) is run for
// every size from 1 to 8; the default-size core (N = 128) inverts one
// 128 x 128 matrix, the benchmark size of the design. The cycle count of
// each run is checked against the schedule of the core:
// n * (MAN_W + 11 + 2(n-1) + 2n(n-1)) + 1 cycles from start to done.
module tb_mat_inv;
  import tb_fp_pkg::*;

  localparam int NS = 8;
  localparam int NL = 128;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // small core
  logic [3:0]  s_n;
  logic        s_wr_en, s_start, s_busy, s_done;
  logic [2:0]  s_wr_row, s_wr_col, s_rd_row, s_rd_col;
  logic [31:0] s_wr_data, s_rd_data;
  mat_inv #(.N(NS)) dut_s (
    .clk, .rst_n, .n(s_n), .wr_en(s_wr_en), .wr_row(s_wr_row), .wr_col(s_wr_col),
    .wr_data(s_wr_data), .rd_row(s_rd_row), .rd_col(s_rd_col), .rd_data(s_rd_data),
    .start(s_start), .busy(s_busy), .done(s_done));

  // default-size core
  logic [7:0]  l_n;
  logic        l_wr_en, l_start, l_busy, l_done;
  logic [6:0]  l_wr_row, l_wr_col, l_rd_row, l_rd_col;
  logic [31:0] l_wr_data, l_rd_data;
  mat_inv dut_l (
    .clk, .rst_n, .n(l_n), .wr_en(l_wr_en), .wr_row(l_wr_row), .wr_col(l_wr_col),
    .wr_data(l_wr_data), .rd_row(l_rd_row), .rd_col(l_rd_col), .rd_data(l_rd_data),
    .start(l_start), .busy(l_busy), .done(l_done));

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real A [NL][NL];
  real X [NL][NL];

  task automatic make_matrix(int n);
    for (int i = 0; i < n; i++)
      for (int j = 0; j <= i; j++) begin
        real v;
        v = real'($urandom_range(0, 2000)) / 1000.0 - 1.0;
        if (i == j) v = v + real'(n) + 1.0;
        A[i][j] = fp_to_real(real_to_fp(v, 8, 23), 8, 23);
        A[j][i] = A[i][j];
      end
  endtask

  task automatic check_inverse(int n, int cycles);
    real maxerr, s;
    int  want;
    maxerr = 0.0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        s = 0.0;
        for (int k = 0; k < n; k++) s += A[i][k] * X[k][j];
        if (i == j) s = s - 1.0;
        if (s < 0.0) s = -s;
        if (s > maxerr) maxerr = s;
      end
    checks++;
    if (maxerr > 1e-4) begin
      failures++;
      $display("FAIL n=%0d: max |A*X - I| = %g", n, maxerr);
    end
    want = n * (23 + 11 + 2 * (n - 1) + 2 * n * (n - 1)) + 1;
    checks++;
    if (cycles != want) begin
      failures++;
      $display("FAIL n=%0d: %0d cycles, expected %0d", n, cycles, want);
    end
    $display("n=%0d: max error %g, %0d cycles", n, maxerr, cycles);
  endtask

  task automatic run_small(int n);
    int cycles;
    make_matrix(n);
    s_n = 4'(n);
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        @(negedge clk);
        s_wr_en = 1'b1; s_wr_row = 3'(i); s_wr_col = 3'(j);
        s_wr_data = real_to_fp(A[i][j], 8, 23)[31:0];
      end
    @(negedge clk); s_wr_en = 1'b0; s_start = 1'b1;
    @(negedge clk); s_start = 1'b0; cycles = 1;
    while (!s_done) begin @(negedge clk); cycles++; end
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        s_rd_row = 3'(i); s_rd_col = 3'(j); #1;
        X[i][j] = fp_to_real(64'(s_rd_data), 8, 23);
      end
    check_inverse(n, cycles);
  endtask

  task automatic run_large(int n);
    int cycles;
    make_matrix(n);
    l_n = 8'(n);
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        @(negedge clk);
        l_wr_en = 1'b1; l_wr_row = 7'(i); l_wr_col = 7'(j);
        l_wr_data = real_to_fp(A[i][j], 8, 23)[31:0];
      end
    @(negedge clk); l_wr_en = 1'b0; l_start = 1'b1;
    @(negedge clk); l_start = 1'b0; cycles = 1;
    while (!l_done) begin @(negedge clk); cycles++; end
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        l_rd_row = 7'(i); l_rd_col = 7'(j); #1;
        X[i][j] = fp_to_real(64'(l_rd_data), 8, 23);
      end
    check_inverse(n, cycles);
  endtask

  initial begin
    s_n = 0; s_wr_en = 0; s_start = 0; s_wr_row = 0; s_wr_col = 0; s_wr_data = 0;
    s_rd_row = 0; s_rd_col = 0;
    l_n = 0; l_wr_en = 0; l_start = 0; l_wr_row = 0; l_wr_col = 0; l_wr_data = 0;
    l_rd_row = 0; l_rd_col = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 1; n <= NS; n++) run_small(n);
    run_small(NS);
    run_large(NL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
