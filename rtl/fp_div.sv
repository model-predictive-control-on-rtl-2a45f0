// fp_div: sequential floating point divider (y = a / b).
//
// Restoring division of the significands, one quotient bit per clock:
// MAN_W+6 quotient bits are produced (integer bit, MAN_W fraction bits,
// one spare for normalisation, guard and extra sticky bits), the remainder gives the sticky bit,
// and fp_round rounds to nearest even. A pulse on start latches a and b;
// done pulses for one cycle when y is valid, MAN_W+8 cycles later. y holds
// its value until the next result. A zero divisor saturates to the largest
// finite value with the quotient's sign (design choice: no infinities).
module fp_div #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  output logic                 busy,
  output logic                 done,
  output logic [EXP_W+MAN_W:0] y
);
  localparam int BIAS = (1 << (EXP_W - 1)) - 1;
  localparam int QW   = MAN_W + 6;
  localparam int CW   = $clog2(QW + 1);

  logic [MAN_W+1:0]        rem, dvs;   // remainder < 2*divisor
  logic [QW-1:0]           q;
  logic [CW-1:0]           cnt;
  logic                    sign_q, a_zero, b_zero;
  logic signed [EXP_W+1:0] exp_q;
  logic                    finish;
  logic [MAN_W:0]          rem_sub;   // < divisor
  logic                    ge;

  // one restoring step
  always_comb begin
    ge      = rem >= dvs;
    rem_sub = (MAN_W+1)'(ge ? rem - dvs : rem);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      finish <= 1'b0;
      cnt    <= '0;
      rem    <= '0;
      dvs    <= '0;
      q      <= '0;
      sign_q <= 1'b0;
      a_zero <= 1'b0;
      b_zero <= 1'b0;
      exp_q  <= '0;
    end else begin
      finish <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        cnt    <= CW'(QW);
        rem    <= {2'b01, a[MAN_W-1:0]};
        dvs    <= {2'b01, b[MAN_W-1:0]};
        q      <= '0;
        sign_q <= a[EXP_W+MAN_W] ^ b[EXP_W+MAN_W];
        a_zero <= (a[EXP_W+MAN_W-1:MAN_W] == '0);
        b_zero <= (b[EXP_W+MAN_W-1:MAN_W] == '0);
        exp_q  <= $signed({2'b00, a[EXP_W+MAN_W-1:MAN_W]}) - $signed({2'b00, b[EXP_W+MAN_W-1:MAN_W]})
                  + (EXP_W+2)'(BIAS);
      end else if (busy) begin
        q   <= {q[QW-2:0], ge};
        rem <= {rem_sub[MAN_W:0], 1'b0};
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy   <= 1'b0;
          finish <= 1'b1;
        end
      end
    end
  end

  // normalise and round the finished quotient
  logic                    n_guard, n_sticky;
  logic [MAN_W-1:0]        n_frac;
  logic signed [EXP_W+1:0] n_exp;
  logic [EXP_W+MAN_W:0]    y_r;

  always_comb begin
    if (q[QW-1]) begin
      n_frac   = q[QW-2 -: MAN_W];
      n_guard  = q[QW-2-MAN_W];
      n_sticky = (q[QW-3-MAN_W:0] != '0) || (rem != '0);
      n_exp    = exp_q;
    end else begin
      n_frac   = q[QW-3 -: MAN_W];
      n_guard  = q[QW-3-MAN_W];
      n_sticky = (q[QW-4-MAN_W:0] != '0) || (rem != '0);
      n_exp    = exp_q - 1'b1;
    end
  end

  fp_round #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_round (
    .sign(sign_q), .exp_in(b_zero ? $signed((EXP_W+2)'((1 << EXP_W) + 1)) : n_exp),
    .frac(n_frac), .guard(n_guard), .sticky(n_sticky), .zero(a_zero), .y(y_r)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      y    <= '0;
    end else begin
      done <= finish;
      if (finish) y <= y_r;
    end
  end
endmodule
