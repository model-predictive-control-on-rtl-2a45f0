// fp_mul: combinational floating point multiplier.
//
// Multiplies the two (MAN_W+1)-bit significands (hidden one restored),
// adds the exponents, normalises the product by at most one place and
// hands fraction, guard and sticky bits to fp_round (round to nearest
// even). A zero operand (exponent code 0) gives a signed zero.
module fp_mul #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  output logic [EXP_W+MAN_W:0] y
);
  localparam int BIAS = (1 << (EXP_W - 1)) - 1;
  localparam int PW   = 2 * (MAN_W + 1);

  logic                    sign, zero, guard, sticky;
  logic [PW-1:0]           prod;
  logic signed [EXP_W+1:0] exp_s;
  logic [MAN_W-1:0]        frac;

  always_comb begin
    sign = a[EXP_W+MAN_W] ^ b[EXP_W+MAN_W];
    zero = (a[EXP_W+MAN_W-1:MAN_W] == '0) || (b[EXP_W+MAN_W-1:MAN_W] == '0);
    prod = PW'({1'b1, a[MAN_W-1:0]}) * PW'({1'b1, b[MAN_W-1:0]});
    exp_s = $signed({2'b00, a[EXP_W+MAN_W-1:MAN_W]}) + $signed({2'b00, b[EXP_W+MAN_W-1:MAN_W]})
            - (EXP_W+2)'(BIAS);
    if (prod[PW-1]) begin
      // product in [2,4): leading one at PW-1
      frac   = prod[PW-2 -: MAN_W];
      guard  = prod[PW-2-MAN_W];
      sticky = |prod[PW-3-MAN_W:0];
      exp_s  = exp_s + 1'b1;
    end else begin
      // product in [1,2): leading one at PW-2
      frac   = prod[PW-3 -: MAN_W];
      guard  = prod[PW-3-MAN_W];
      sticky = |prod[PW-4-MAN_W:0];
    end
  end

  fp_round #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_round (
    .sign, .exp_in(exp_s), .frac, .guard, .sticky, .zero, .y
  );
endmodule
