// fp_round: final rounding and packing stage shared by the floating point
// adder, multiplier and divider.
//
// Takes an unpacked result -- sign, a signed biased exponent, the MAN_W
// fraction bits below the hidden one, a guard bit and a sticky bit -- and
// rounds to nearest, ties to even. A carry out of the fraction bumps the
// exponent. Exponents at or below zero flush to signed zero; exponents at
// or above the all-ones code saturate to the largest finite value (this
// design keeps no infinities). Purely combinational.
module fp_round #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic                     sign,
  input  logic signed [EXP_W+1:0]  exp_in,   // biased exponent, may be out of range
  input  logic [MAN_W-1:0]         frac,
  input  logic                     guard,
  input  logic                     sticky,
  input  logic                     zero,     // force a zero result
  output logic [EXP_W+MAN_W:0]     y
);
  localparam int EXP_MAX = (1 << EXP_W) - 1;

  logic                    round_up;
  logic [MAN_W:0]          frac_r;    // one extra bit for the rounding carry
  logic signed [EXP_W+1:0] exp_r;

  always_comb begin
    round_up = guard & (sticky | frac[0]);
    frac_r   = {1'b0, frac} + {{MAN_W{1'b0}}, round_up};
    exp_r    = exp_in + (frac_r[MAN_W] ? (EXP_W+2)'(1) : '0);
    if (zero || exp_r <= 0)
      y = {sign, {(EXP_W+MAN_W){1'b0}}};
    else if (exp_r >= (EXP_W+2)'(EXP_MAX))
      y = {sign, EXP_W'(EXP_MAX - 1), {MAN_W{1'b1}}};
    else
      y = {sign, exp_r[EXP_W-1:0], frac_r[MAN_W-1:0]};
  end
endmodule
