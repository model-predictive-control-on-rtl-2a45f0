// fp_add: combinational floating point adder (y = a + b).
//
// The operand with the larger magnitude is taken as the base; the other
// significand is shifted right by the exponent difference into three extra
// bits (guard, round, sticky). Equal signs add, with at most one right
// normalising shift; opposite signs subtract and are normalised left by a
// leading-zero count. Rounding to nearest even and range handling are done
// by fp_round. Subtraction is done by the caller flipping b's sign bit.
module fp_add #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  output logic [EXP_W+MAN_W:0] y
);
  localparam int W  = MAN_W + 4;   // hidden one, fraction, guard, round, sticky
  localparam int SW = $clog2(W + 1);

  logic [EXP_W+MAN_W:0] larger, lesser, y_r;
  logic                 a_zero, b_zero, sign, guard, sticky, zero, found;
  logic [EXP_W-1:0]     diff;
  logic [W-1:0]         mb, ms, ms_sh;
  logic [W:0]           sum;
  logic [SW-1:0]        lz;
  logic signed [EXP_W+1:0] exp_s;
  logic [MAN_W-1:0]     frac;

  always_comb begin
    a_zero = (a[EXP_W+MAN_W-1:MAN_W] == '0);
    b_zero = (b[EXP_W+MAN_W-1:MAN_W] == '0);
    if (a[EXP_W+MAN_W-1:0] >= b[EXP_W+MAN_W-1:0]) begin
      larger = a; lesser = b;
    end else begin
      larger = b; lesser = a;
    end
    sign = larger[EXP_W+MAN_W];
    diff = larger[EXP_W+MAN_W-1:MAN_W] - lesser[EXP_W+MAN_W-1:MAN_W];
    mb   = {1'b1, larger[MAN_W-1:0], 3'b000};
    ms   = {1'b1, lesser[MAN_W-1:0], 3'b000};
    // alignment shift with sticky collection
    if (diff >= EXP_W'(W)) begin
      ms_sh = {{(W-1){1'b0}}, 1'b1};
    end else begin
      ms_sh = ms >> diff;
      if ((ms & ((W'(1) << diff) - W'(1))) != '0) ms_sh[0] = 1'b1;
    end
    exp_s = $signed({2'b00, larger[EXP_W+MAN_W-1:MAN_W]});
    zero  = 1'b0;
    found = 1'b0;
    lz    = '0;
    if (larger[EXP_W+MAN_W] == lesser[EXP_W+MAN_W]) begin
      sum = {1'b0, mb} + {1'b0, ms_sh};
      if (sum[W]) begin
        sum   = {1'b0, sum[W:2], sum[1] | sum[0]};
        exp_s = exp_s + 1'b1;
      end
    end else begin
      sum = {1'b0, mb} - {1'b0, ms_sh};
      if (sum == '0) zero = 1'b1;
      found = 1'b0;
      for (int k = W - 1; k >= 0; k--) begin
        if (sum[k]) found = 1'b1;
        if (!found) lz = lz + 1'b1;
      end
      sum   = sum << lz;
      exp_s = exp_s - $signed({{(EXP_W+2-SW){1'b0}}, lz});
    end
    frac   = sum[W-2 -: MAN_W];
    guard  = sum[2];
    sticky = sum[1] | sum[0];
  end

  fp_round #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_round (
    .sign, .exp_in(exp_s), .frac, .guard, .sticky, .zero, .y(y_r)
  );

  always_comb begin
    if (a_zero)      y = b_zero ? '0 : b;
    else if (b_zero) y = a;
    else             y = y_r;
  end
endmodule
