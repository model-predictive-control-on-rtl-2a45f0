// mpc_chip: constrained model predictive control on a chip.
//
// At every sampling instant an MPC controller must solve a quadratic
// program, minimise 1/2 u'Qu + c'u subject to Ju <= g, over the future
// control moves u. This top level is that solver as a stand-alone device
// attached to a host computer by an RS232 serial line: the host sends the
// problem (Q, c, J, g), the chip solves it with the interior point method
// in floating point and sends back u, of which the host applies the first
// move to the plant.
//
//   rxd -> uart_rx -> host_if -> ipm_solver (fp_alu, mat_inv) -> host_if
//       -> uart_tx -> txd
//
// Defaults: IEEE single precision, up to Nu*m = 45 decision variables and
// 128 constraints, 28 MHz clock and 115200 baud (243 clocks per bit). The
// reduced (9,18) number format is selected with EXP_W = 9, MAN_W = 18.
// Timing: a problem is solved as soon as its last byte has arrived; the
// answer follows the solver's done. busy shows the solver running;
// rx_frame_err pulses on a received byte with a bad stop bit.
//
// The partition into serial link, floating point library, matrix
// inversion core and interior point solver, the formats and the sizes
// follow the design description; the byte protocol and the baud rate are
// choices of this implementation.
module mpc_chip
  import mpc_pkg::*;
#(
  parameter int unsigned EXP_W        = FP_EXP_W,
  parameter int unsigned MAN_W        = FP_MAN_W,
  parameter int unsigned NU           = 45,
  parameter int unsigned MC           = 128,
  parameter int unsigned MAX_ITER     = 60,
  parameter int unsigned CLKS_PER_BIT = 243
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rxd,
  output logic txd,
  output logic busy,
  output logic rx_frame_err
);
  localparam int unsigned FW  = EXP_W + MAN_W + 1;
  localparam int unsigned NIW = $clog2(NU + 1);
  localparam int unsigned MIW = $clog2(MC + 1);
  localparam int unsigned ITW = $clog2(MAX_ITER + 1);

  logic [7:0]     rx_data, tx_data;
  logic           rx_valid, tx_valid, tx_ready;
  logic           ld_en, start, done, converged;
  mem_sel_e       ld_sel;
  logic [MIW-1:0] ld_row, mc;
  logic [NIW-1:0] ld_col, n, u_idx;
  logic [FW-1:0]  ld_data, u_data;
  logic [ITW-1:0] iterations;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd, .data(rx_data), .valid(rx_valid), .frame_err(rx_frame_err)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data(tx_data), .valid(tx_valid), .ready(tx_ready), .txd
  );

  host_if #(.FW(FW), .NU(NU), .MC(MC), .ITW(ITW)) u_host (
    .clk, .rst_n, .rx_data, .rx_valid, .tx_data, .tx_valid, .tx_ready,
    .ld_en, .ld_sel, .ld_row, .ld_col, .ld_data, .n, .mc, .start, .done, .converged,
    .iterations, .u_idx, .u_data
  );

  ipm_solver #(.EXP_W(EXP_W), .MAN_W(MAN_W), .NU(NU), .MC(MC), .MAX_ITER(MAX_ITER)) u_solver (
    .clk, .rst_n, .ld_en, .ld_sel, .ld_row, .ld_col, .ld_data, .n, .mc, .start,
    .busy, .done, .converged, .iterations, .u_idx, .u_data
  );

endmodule
