// tb_host_if: self-checking test of the host protocol engine.
//
// Bytes are fed straight into the receive side (no serial line). The test
// checks that every received word is written to the right memory, row and
// column with the right value, that the solver is started exactly once
// after the last word of g, and that after done the status byte and the
// n words of u (from a model of the solver's result port) are sent least
// significant byte first. Two problems are run back to back; one uses the
// 28-bit reduced format (9,18), whose words travel right-aligned in 4 bytes.
module tb_host_if;
  import mpc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  rx_data, tx_data;
  logic        rx_valid, tx_valid, ld_en, start, done, converged;
  mem_sel_e    ld_sel;
  logic [5:0]  ld_row;
  logic [3:0]  ld_col, n, u_idx;
  logic [5:0]  mc;
  logic [31:0] ld_data;
  logic [5:0]  iterations;
  logic [31:0] u_data;

  // second instance: reduced format
  logic        r_rx_valid, r_tx_valid, r_ld_en, r_start, r_done;
  logic [7:0]  r_rx_data, r_tx_data;
  mem_sel_e    r_ld_sel;
  logic [5:0]  r_ld_row, r_mc;
  logic [3:0]  r_ld_col, r_n, r_u_idx;
  logic [27:0] r_ld_data, r_u_data;

  host_if #(.FW(32), .NU(8), .MC(40), .ITW(6)) dut (
    .clk, .rst_n, .rx_data, .rx_valid, .tx_data, .tx_valid, .tx_ready(1'b1),
    .ld_en, .ld_sel, .ld_row, .ld_col, .ld_data, .n, .mc, .start, .done, .converged,
    .iterations, .u_idx, .u_data);

  host_if #(.FW(28), .NU(8), .MC(40), .ITW(6)) dut_r (
    .clk, .rst_n, .rx_data(r_rx_data), .rx_valid(r_rx_valid), .tx_data(r_tx_data),
    .tx_valid(r_tx_valid), .tx_ready(1'b1), .ld_en(r_ld_en), .ld_sel(r_ld_sel),
    .ld_row(r_ld_row), .ld_col(r_ld_col), .ld_data(r_ld_data), .n(r_n), .mc(r_mc),
    .start(r_start), .done(r_done), .converged(1'b0), .iterations(6'd60),
    .u_idx(r_u_idx), .u_data(r_u_data));

  // model of the solver's result port
  assign u_data   = 32'hA5000000 | 32'(u_idx) * 32'h01010101;
  assign r_u_data = 28'h5A00000  | 28'(r_u_idx) * 28'h0010101;

  // expected write stream
  typedef struct { mem_sel_e sel; int row; int col; logic [31:0] val; } wr_t;
  wr_t exp_q [$];
  wr_t exp_r [$];
  int  starts = 0, r_starts = 0;
  logic [7:0] txq [$];
  logic [7:0] r_txq [$];

  function automatic logic [31:0] val_of(int sel, int row, int col);
    return 32'h3F000000 + 32'(sel) * 32'h00100000 + 32'(row) * 32'h100 + 32'(col);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ld_en) begin
      wr_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected write");
      end else begin
        e = exp_q.pop_front();
        if (ld_sel != e.sel || int'(ld_row) != e.row || int'(ld_col) != e.col || ld_data != e.val) begin
          failures++;
          $display("FAIL write %s[%0d][%0d]=%h, want %s[%0d][%0d]=%h", ld_sel.name(), ld_row,
                   ld_col, ld_data, e.sel.name(), e.row, e.col, e.val);
        end
      end
    end
    if (r_ld_en) begin
      wr_t e;
      checks++;
      e = exp_r.pop_front();
      if (r_ld_sel != e.sel || int'(r_ld_row) != e.row || int'(r_ld_col) != e.col ||
          r_ld_data != e.val[27:0]) begin
        failures++;
        $display("FAIL reduced write %s[%0d][%0d]=%h", r_ld_sel.name(), r_ld_row, r_ld_col, r_ld_data);
      end
    end
    if (start) starts++;
    if (r_start) r_starts++;
    if (tx_valid) txq.push_back(tx_data);
    if (r_tx_valid) r_txq.push_back(r_tx_data);
  end

  task automatic send(bit red, logic [7:0] b);
    @(negedge clk);
    if (red) begin r_rx_data = b; r_rx_valid = 1'b1; end
    else     begin rx_data = b;   rx_valid = 1'b1; end
    @(negedge clk);
    r_rx_valid = 1'b0; rx_valid = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  task automatic send_problem(bit red, int nn, int mm);
    int rows, cols;
    send(red, 8'(nn));
    send(red, 8'(mm));
    for (int s = 0; s < 4; s++) begin
      rows = (s < 2) ? nn : mm;
      cols = (s == 0 || s == 2) ? nn : 1;
      for (int r = 0; r < rows; r++)
        for (int c = 0; c < cols; c++) begin
          wr_t e;
          e.sel = mem_sel_e'(s); e.row = r; e.col = c; e.val = val_of(s, r, c);
          if (red) begin
            e.val = {4'h0, e.val[27:0]};
            exp_r.push_back(e);
          end else exp_q.push_back(e);
          for (int b = 0; b < 4; b++) send(red, e.val[8*b +: 8]);
        end
    end
  endtask

  initial begin
    rx_valid = 0; rx_data = 0; done = 0; converged = 0; iterations = 0;
    r_rx_valid = 0; r_rx_data = 0; r_done = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int pass = 0; pass < 2; pass++) begin
      int nn, mm;
      nn = pass == 0 ? 3 : 5;
      mm = pass == 0 ? 7 : 2;
      txq.delete();
      send_problem(1'b0, nn, mm);
      repeat (5) @(negedge clk);
      checks++;
      if (starts != pass + 1 || exp_q.size() != 0 || n != 4'(nn) || mc != 6'(mm)) begin
        failures++;
        $display("FAIL pass %0d: starts=%0d left=%0d n=%0d mc=%0d", pass, starts, exp_q.size(), n, mc);
      end
      converged = 1'b1; iterations = 6'(9 + pass);
      @(negedge clk); done = 1'b1; @(negedge clk); done = 1'b0;
      repeat (20 * (nn * 4 + 1) + 20) @(negedge clk);
      checks++;
      if (txq.size() != 1 + 4 * nn) begin
        failures++; $display("FAIL pass %0d: %0d bytes sent", pass, txq.size());
      end else begin
        if (txq[0] != {1'b1, 7'(9 + pass)}) begin
          failures++; $display("FAIL status byte %h", txq[0]);
        end
        for (int i = 0; i < nn; i++) begin
          logic [31:0] w;
          w = {txq[4*i+4], txq[4*i+3], txq[4*i+2], txq[4*i+1]};
          checks++;
          if (w != (32'hA5000000 | 32'(i) * 32'h01010101)) begin
            failures++; $display("FAIL u[%0d] = %h", i, w);
          end
        end
      end
    end

    // reduced format
    send_problem(1'b1, 2, 3);
    repeat (5) @(negedge clk);
    @(negedge clk); r_done = 1'b1; @(negedge clk); r_done = 1'b0;
    repeat (200) @(negedge clk);
    checks++;
    if (r_starts != 1 || exp_r.size() != 0 || r_txq.size() != 9 || r_txq[0] != 8'h3C) begin
      failures++; $display("FAIL reduced: starts=%0d bytes=%0d", r_starts, r_txq.size());
    end else
      for (int i = 0; i < 2; i++) begin
        logic [31:0] w;
        w = {r_txq[4*i+4], r_txq[4*i+3], r_txq[4*i+2], r_txq[4*i+1]};
        checks++;
        if (w != {4'h0, 28'h5A00000 | 28'(i) * 28'h0010101}) begin
          failures++; $display("FAIL reduced u[%0d] = %h", i, w);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
