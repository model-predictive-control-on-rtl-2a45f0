// fp_alu: the floating point arithmetic unit used by the solver and by the
// matrix inversion core.
//
// One operation at a time: start (one cycle, with op, a, b, c valid) begins
// it and done pulses when y holds the result; y stays valid until the next
// done. Add, subtract, multiply and the two multiply-accumulates
// (c + a*b, c - a*b) are combinational and finish one cycle after start;
// divide uses the bit-serial divider and finishes MAN_W+9 cycles after
// start. The multiply-accumulate rounds the product before the sum, as a
// multiplier followed by an adder from a floating point library would.
// busy is high from start until done. A start while busy is ignored.
module fp_alu
  import mpc_pkg::*;
#(
  parameter int unsigned EXP_W = FP_EXP_W,
  parameter int unsigned MAN_W = FP_MAN_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  fp_op_e               op,
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  input  logic [EXP_W+MAN_W:0] c,
  output logic                 busy,
  output logic                 done,
  output logic [EXP_W+MAN_W:0] y
);
  localparam int SB = EXP_W + MAN_W;   // sign bit position

  logic [SB:0] prod, add_a, add_b, add_y, div_y;
  logic        div_done, div_start;

  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_mul (.a, .b, .y(prod));

  always_comb begin
    unique case (op)
      FP_ADD:  begin add_a = a; add_b = b; end
      FP_SUB:  begin add_a = a; add_b = {~b[SB], b[SB-1:0]}; end
      FP_MAC:  begin add_a = c; add_b = prod; end
      FP_NMAC: begin add_a = c; add_b = {~prod[SB], prod[SB-1:0]}; end
      default: begin add_a = a; add_b = b; end
    endcase
  end

  fp_add #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_add (.a(add_a), .b(add_b), .y(add_y));

  assign div_start = start && !busy && (op == FP_DIV);

  fp_div #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_div (
    .clk, .rst_n, .start(div_start), .a, .b, .busy(), .done(div_done), .y(div_y)
  );

  logic div_wait;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      div_wait <= 1'b0;
      y        <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        if (op == FP_DIV) begin
          busy     <= 1'b1;
          div_wait <= 1'b1;
        end else begin
          y    <= (op == FP_MUL) ? prod : add_y;
          done <= 1'b1;
        end
      end else if (div_wait && div_done) begin
        y        <= div_y;
        done     <= 1'b1;
        busy     <= 1'b0;
        div_wait <= 1'b0;
      end
    end
  end

  // a new operation must not be issued while a division is running
  assert property (@(posedge clk) disable iff (!rst_n) !(start && busy));

endmodule
