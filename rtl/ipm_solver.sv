// ipm_solver: constrained quadratic program solver for model predictive
// control, by the infeasible primal-dual interior point method.
//
// Solves   minimise 1/2 u'Qu + c'u   subject to   Ju <= g
// for u of length n <= NU with mc <= MC inequality constraints. Q must be
// symmetric positive definite. With slacks t and multipliers lambda, every
// iteration forms the reduced Newton system of size n x n,
//   d     = lambda ./ t                       (d = -inverse of Gamma)
//   r1    = -Qu - J'lambda - c
//   r2    = g - Ju - sigma*mu ./ lambda
//   M     = Q + J' diag(d) J,     rhs = r1 + J'(d .* r2)
//   du    = inv(M) rhs
//   dlam  = -d .* (r2 - J du)
//   dt    = -t + (sigma*mu - t .* dlam) ./ lambda
// takes the step alpha = min(1, TAU * largest step keeping lambda, t > 0)
// and repeats until mu = t'lambda / mc < EPS_MU or MAX_ITER iterations.
// M is inverted by the mat_inv core; all other arithmetic is done one
// operation at a time by a single fp_alu, as a sequential program would.
//
// Interface: while idle, problem data are written through ld_* (select Q,
// c, J or g; row and column; row-major). A start pulse latches n and mc and
// runs the solver from u = 0, lambda = 1, t = 1; busy stays high until done
// pulses. Then converged, iterations and the solution (u_idx -> u_data,
// combinational) are valid until the next start.
//
// From the design description: the method and its steps, the reduced
// system (22) used to compute the increments, the matrix inversion, the
// stopping test mu < 1e-5 and the default sizes n <= 45, mc <= 128. Choices
// of this implementation: the starting point, sigma = 0.1, the step rule
// with TAU = 0.995, the iteration limit, the order of operations, and the
// sign of the g - Ju term in r2, which is taken so that the Newton step
// agrees with the feasibility condition Ju + t = g.
module ipm_solver
  import mpc_pkg::*;
#(
  parameter int unsigned EXP_W    = FP_EXP_W,
  parameter int unsigned MAN_W    = FP_MAN_W,
  parameter int unsigned NU       = 45,     // largest Nu*m
  parameter int unsigned MC       = 128,    // largest number of constraints
  parameter int unsigned MAX_ITER = 60,
  parameter real         SIGMA    = 0.1,
  parameter real         TAU      = 0.995,
  parameter real         EPS_MU   = 1.0e-5,
  localparam int unsigned FW      = EXP_W + MAN_W + 1,
  localparam int unsigned NIW     = $clog2(NU + 1),
  localparam int unsigned MIW     = $clog2(MC + 1),
  localparam int unsigned ITW     = $clog2(MAX_ITER + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // problem loading
  input  logic            ld_en,
  input  mem_sel_e        ld_sel,
  input  logic [MIW-1:0]  ld_row,
  input  logic [NIW-1:0]  ld_col,
  input  logic [FW-1:0]   ld_data,
  // control
  input  logic [NIW-1:0]  n,
  input  logic [MIW-1:0]  mc,
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic            converged,
  output logic [ITW-1:0]  iterations,
  // solution
  input  logic [NIW-1:0]  u_idx,
  output logic [FW-1:0]   u_data
);
  localparam int unsigned CW = $clog2(NU + 2 * MC + 2);
  localparam int unsigned SB = FW - 1;

  localparam logic [FW-1:0] ZERO   = '0;
  localparam logic [FW-1:0] ONE    = FW'(const_to_fp(1.0, EXP_W, MAN_W));
  localparam logic [FW-1:0] TWO    = FW'(const_to_fp(2.0, EXP_W, MAN_W));
  localparam logic [FW-1:0] SIG_FP = FW'(const_to_fp(SIGMA, EXP_W, MAN_W));
  localparam logic [FW-1:0] TAU_FP = FW'(const_to_fp(TAU, EXP_W, MAN_W));
  localparam logic [FW-1:0] EPS_FP = FW'(const_to_fp(EPS_MU, EXP_W, MAN_W));

  typedef enum logic [3:0] {
    PH_INIT, PH_MU, PH_D, PH_R1, PH_R2, PH_SJ, PH_M, PH_RHS, PH_INV,
    PH_DU, PH_DL, PH_DT, PH_ALPHA, PH_ALPHA2, PH_UPD
  } phase_e;

  typedef enum logic [2:0] {
    S_IDLE, S_ELEM, S_ISSUE, S_WAIT, S_FIN, S_MIRROR, S_NEXT, S_INV
  } state_e;

  // ---------------------------------------------------------------- memories
  logic [FW-1:0] q_m   [NU*NU];
  logic [FW-1:0] j_m   [MC*NU];
  logic [FW-1:0] sj_m  [MC*NU];   // d_k * J[k][i]
  logic [FW-1:0] c_m   [NU];
  logic [FW-1:0] u_m   [NU];
  logic [FW-1:0] r1_m  [NU];
  logic [FW-1:0] rhs_m [NU];
  logic [FW-1:0] du_m  [NU];
  logic [FW-1:0] g_m   [MC];
  logic [FW-1:0] lam_m [MC];
  logic [FW-1:0] t_m   [MC];
  logic [FW-1:0] d_m   [MC];
  logic [FW-1:0] r2_m  [MC];
  logic [FW-1:0] w_m   [MC];
  logic [FW-1:0] dl_m  [MC];
  logic [FW-1:0] dt_m  [MC];

  // ---------------------------------------------------------------- control
  state_e         state;
  phase_e         phase;
  logic [CW-1:0]  i, col, k;
  logic [2:0]     sub;
  logic [NIW-1:0] n_r;
  logic [MIW-1:0] mc_r;
  logic [FW-1:0]  acc, tmp, mu_r, smu, amin, alpha;
  logic [ITW-1:0] iter;

  // floating point unit
  logic          alu_start, alu_done;
  fp_op_e        alu_op;
  logic [FW-1:0] alu_a, alu_b, alu_c, alu_y;

  fp_alu #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_alu (
    .clk, .rst_n, .start(alu_start), .op(alu_op), .a(alu_a), .b(alu_b), .c(alu_c),
    .busy(), .done(alu_done), .y(alu_y)
  );

  // matrix inversion core holding M and then inv(M)
  logic                  inv_wr_en, inv_start, inv_done;
  logic [$clog2(NU)-1:0] inv_wr_row, inv_wr_col, inv_rd_row, inv_rd_col;
  logic [FW-1:0]         inv_rd_data;

  mat_inv #(.EXP_W(EXP_W), .MAN_W(MAN_W), .N(NU)) u_inv (
    .clk, .rst_n, .n(n_r), .wr_en(inv_wr_en), .wr_row(inv_wr_row), .wr_col(inv_wr_col),
    .wr_data(acc), .rd_row(inv_rd_row), .rd_col(inv_rd_col), .rd_data(inv_rd_data),
    .start(inv_start), .busy(), .done(inv_done)
  );

  // ---------------------------------------------------------------- helpers
  function automatic int unsigned qa(logic [CW-1:0] r, logic [CW-1:0] cc);
    return int'(r) * NU + int'(cc);
  endfunction

  function automatic logic [FW-1:0] neg(logic [FW-1:0] x);
    return {~x[SB], x[SB-1:0]};
  endfunction

  function automatic logic is_neg(logic [FW-1:0] x);
    return x[SB] && (x[SB-1:MAN_W] != '0);
  endfunction

  // a < b for words of the design's format (no infinities or NaNs)
  function automatic logic fp_lt(logic [FW-1:0] a, logic [FW-1:0] b);
    logic a_z, b_z;
    a_z = (a[SB-1:MAN_W] == '0);
    b_z = (b[SB-1:MAN_W] == '0);
    if (a_z && b_z) return 1'b0;
    if (a_z) return !b[SB] ? 1'b1 : 1'b0;
    if (b_z) return a[SB];
    if (a[SB] != b[SB]) return a[SB];
    if (!a[SB]) return a[SB-1:0] < b[SB-1:0];
    return a[SB-1:0] > b[SB-1:0];
  endfunction

  // unsigned integer to floating point (exact for the sizes used here)
  function automatic logic [FW-1:0] int_to_fp(logic [MIW-1:0] v);
    int          msb;
    logic [63:0] f;
    if (v == '0) return '0;
    msb = 0;
    for (int b = 0; b < MIW; b++) if (v[b]) msb = b;
    f = 64'(v) << (MAN_W - msb);   // hidden one lands at bit MAN_W
    return {1'b0, EXP_W'(msb + (1 << (EXP_W - 1)) - 1), f[MAN_W-1:0]};
  endfunction

  // ------------------------------------------------- per-phase loop bounds
  logic [CW-1:0] n_out, n_term, n_post, i_row;
  logic [FW-1:0] x_upd, dx_upd, x_alpha, dx_alpha, init_val;

  always_comb begin
    // element selection for ALPHA (lambda then t) and UPD (u, lambda, t)
    i_row = i;
    if (phase == PH_ALPHA && i >= CW'(mc_r)) i_row = i - CW'(mc_r);
    if (phase == PH_UPD) begin
      if (i >= CW'(n_r) + CW'(mc_r)) i_row = i - CW'(n_r) - CW'(mc_r);
      else if (i >= CW'(n_r))        i_row = i - CW'(n_r);
    end
    x_alpha  = (i < CW'(mc_r)) ? lam_m[i_row] : t_m[i_row];
    dx_alpha = (i < CW'(mc_r)) ? dl_m[i_row]  : dt_m[i_row];
    if (i < CW'(n_r)) begin
      x_upd = u_m[i_row]; dx_upd = du_m[i_row];
    end else if (i < CW'(n_r) + CW'(mc_r)) begin
      x_upd = lam_m[i_row]; dx_upd = dl_m[i_row];
    end else begin
      x_upd = t_m[i_row]; dx_upd = dt_m[i_row];
    end

    n_term = '0;
    n_post = '0;
    n_out  = '0;
    init_val = ZERO;
    unique case (phase)
      PH_INIT:   n_out = (CW'(n_r) > CW'(mc_r)) ? CW'(n_r) : CW'(mc_r);
      PH_MU:     begin n_out = 1;                 n_term = CW'(mc_r); n_post = 2; end
      PH_D:      begin n_out = CW'(mc_r);         n_post = 1; end
      PH_R1:     begin n_out = CW'(n_r);          n_term = CW'(n_r) + CW'(mc_r);
                       init_val = neg(c_m[i]); end
      PH_R2:     begin n_out = CW'(mc_r);         n_term = CW'(n_r); n_post = 3;
                       init_val = g_m[i]; end
      PH_SJ:     begin n_out = CW'(mc_r);         n_post = 1; end
      PH_M:      begin n_out = CW'(n_r);          n_term = CW'(mc_r);
                       init_val = q_m[qa(i, col)]; end
      PH_RHS:    begin n_out = CW'(n_r);          n_term = CW'(mc_r); init_val = r1_m[i]; end
      PH_INV:    n_out = 1;
      PH_DU:     begin n_out = CW'(n_r);          n_term = CW'(n_r); end
      PH_DL:     begin n_out = CW'(mc_r);         n_term = CW'(n_r); n_post = 1;
                       init_val = r2_m[i]; end
      PH_DT:     begin n_out = CW'(mc_r);         n_post = 4; end
      PH_ALPHA:  begin n_out = 2 * CW'(mc_r);     n_post = is_neg(dx_alpha) ? 1 : 0; end
      PH_ALPHA2: begin n_out = 1;                 n_post = 1; end
      default:   begin n_out = CW'(n_r) + 2 * CW'(mc_r); n_post = 1; end   // PH_UPD
    endcase
  end

  // ------------------------------------------------- operand selection
  logic in_term;
  logic [CW-1:0] kk;   // term index into the second block of R1

  always_comb begin
    in_term = (k < n_term);
    kk      = k - CW'(n_r);
    alu_op  = FP_MUL;
    alu_a   = ZERO;
    alu_b   = ZERO;
    alu_c   = acc;
    if (in_term) begin
      unique case (phase)
        PH_MU:  begin alu_op = FP_MAC;  alu_a = lam_m[k];          alu_b = t_m[k]; end
        PH_R1:  begin
          alu_op = FP_NMAC;
          if (k < CW'(n_r)) begin alu_a = q_m[qa(i, k)];  alu_b = u_m[k]; end
          else              begin alu_a = j_m[qa(kk, i)]; alu_b = lam_m[kk]; end
        end
        PH_R2:  begin alu_op = FP_NMAC; alu_a = j_m[qa(i, k)];     alu_b = u_m[k]; end
        PH_M:   begin alu_op = FP_MAC;  alu_a = sj_m[qa(k, i)];    alu_b = j_m[qa(k, col)]; end
        PH_RHS: begin alu_op = FP_MAC;  alu_a = j_m[qa(k, i)];     alu_b = w_m[k]; end
        PH_DU:  begin alu_op = FP_MAC;  alu_a = inv_rd_data;       alu_b = rhs_m[k]; end
        PH_DL:  begin alu_op = FP_NMAC; alu_a = j_m[qa(i, k)];     alu_b = du_m[k]; end
        default: ;
      endcase
    end else begin
      unique case (phase)
        PH_MU: begin
          if (sub == 0) begin alu_op = FP_DIV; alu_a = acc;    alu_b = int_to_fp(mc_r); end
          else          begin alu_op = FP_MUL; alu_a = SIG_FP; alu_b = acc; end
        end
        PH_D:  begin alu_op = FP_DIV; alu_a = lam_m[i]; alu_b = t_m[i]; end
        PH_R2: begin
          if (sub == 0)      begin alu_op = FP_DIV; alu_a = smu;    alu_b = lam_m[i]; end
          else if (sub == 1) begin alu_op = FP_SUB; alu_a = acc;    alu_b = tmp; end
          else               begin alu_op = FP_MUL; alu_a = d_m[i]; alu_b = acc; end
        end
        PH_SJ: begin alu_op = FP_MUL; alu_a = d_m[i]; alu_b = j_m[qa(i, col)]; end
        PH_DL: begin alu_op = FP_MUL; alu_a = d_m[i]; alu_b = acc; end
        PH_DT: begin
          unique case (sub)
            3'd0:    begin alu_op = FP_MUL; alu_a = t_m[i]; alu_b = dl_m[i]; end
            3'd1:    begin alu_op = FP_SUB; alu_a = smu;    alu_b = acc; end
            3'd2:    begin alu_op = FP_DIV; alu_a = acc;    alu_b = lam_m[i]; end
            default: begin alu_op = FP_SUB; alu_a = acc;    alu_b = t_m[i]; end
          endcase
        end
        PH_ALPHA:  begin alu_op = FP_DIV; alu_a = x_alpha; alu_b = dx_alpha; end
        PH_ALPHA2: begin alu_op = FP_MUL; alu_a = TAU_FP;  alu_b = amin; end
        PH_UPD:    begin alu_op = FP_MAC; alu_a = alpha;   alu_b = dx_upd; alu_c = x_upd; end
        default: ;
      endcase
    end
    alu_start = (state == S_ISSUE);
  end

  // mat_inv ports
  always_comb begin
    inv_wr_en  = (state == S_FIN || state == S_MIRROR) && phase == PH_M;
    inv_wr_row = (state == S_MIRROR) ? col[$clog2(NU)-1:0] : i[$clog2(NU)-1:0];
    inv_wr_col = (state == S_MIRROR) ? i[$clog2(NU)-1:0]   : col[$clog2(NU)-1:0];
    inv_rd_row = i[$clog2(NU)-1:0];
    inv_rd_col = k[$clog2(NU)-1:0];
    inv_start  = (state == S_ELEM) && phase == PH_INV;
  end

  // ------------------------------------------------- memory writes
  always_ff @(posedge clk) begin
    if (state == S_IDLE && ld_en) begin
      unique case (ld_sel)
        SEL_Q: q_m[int'(ld_row) * NU + int'(ld_col)] <= ld_data;
        SEL_C: c_m[ld_row] <= ld_data;
        SEL_J: j_m[int'(ld_row) * NU + int'(ld_col)] <= ld_data;
        default: g_m[ld_row] <= ld_data;
      endcase
    end
    if (state == S_ELEM && phase == PH_INIT) begin
      if (i < CW'(n_r))  u_m[i] <= ZERO;
      if (i < CW'(mc_r)) begin lam_m[i] <= ONE; t_m[i] <= ONE; end
    end
    if (state == S_WAIT && alu_done && phase == PH_R2 && sub == 3'd1 && !in_term)
      r2_m[i] <= alu_y;
    if (state == S_FIN) begin
      unique case (phase)
        PH_D:   d_m[i] <= acc;
        PH_R1:  r1_m[i] <= acc;
        PH_R2:  w_m[i] <= acc;
        PH_SJ:  sj_m[qa(i, col)] <= acc;
        PH_RHS: rhs_m[i] <= acc;
        PH_DU:  du_m[i] <= acc;
        PH_DL:  dl_m[i] <= neg(acc);
        PH_DT:  dt_m[i] <= acc;
        PH_UPD: begin
          if (i < CW'(n_r))                   u_m[i_row] <= acc;
          else if (i < CW'(n_r) + CW'(mc_r))  lam_m[i_row] <= acc;
          else                                t_m[i_row] <= acc;
        end
        default: ;
      endcase
    end
  end

  // ------------------------------------------------- sequencer
  logic last_elem;
  always_comb begin
    unique case (phase)
      PH_SJ:   last_elem = (i + 1'b1 >= n_out) && (col + 1'b1 >= CW'(n_r));
      PH_M:    last_elem = (i + 1'b1 >= n_out) && (col + 1'b1 >= CW'(n_r));
      default: last_elem = (i + 1'b1 >= n_out);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      phase      <= PH_INIT;
      i          <= '0;
      col        <= '0;
      k          <= '0;
      sub        <= '0;
      n_r        <= '0;
      mc_r       <= '0;
      acc        <= '0;
      tmp        <= '0;
      mu_r       <= '0;
      smu        <= '0;
      amin       <= '0;
      alpha      <= '0;
      iter       <= '0;
      done       <= 1'b0;
      converged  <= 1'b0;
      iterations <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            n_r       <= n;
            mc_r      <= mc;
            phase     <= PH_INIT;
            i         <= '0;
            col       <= '0;
            iter      <= '0;
            converged <= 1'b0;
            state     <= S_ELEM;
          end
        end

        S_ELEM: begin
          acc <= init_val;
          k   <= '0;
          sub <= '0;
          if (phase == PH_INIT)                      state <= S_NEXT;
          else if (phase == PH_INV)                  state <= S_INV;
          else if (n_term == '0 && n_post == '0)     state <= S_NEXT;   // ALPHA: no limit
          else                                       state <= S_ISSUE;
        end

        S_ISSUE: state <= S_WAIT;

        S_WAIT: begin
          if (alu_done) begin
            if (in_term) begin
              acc <= alu_y;
              k   <= k + 1'b1;
              state <= (k + 1'b1 >= n_term && n_post == '0) ? S_FIN : S_ISSUE;
            end else begin
              sub <= sub + 1'b1;
              state <= (CW'(sub) + 1'b1 >= n_post) ? S_FIN : S_ISSUE;
              if (phase == PH_R2 && sub == 3'd0) tmp <= alu_y;
              else acc <= alu_y;
              if (phase == PH_MU && sub == 3'd0) mu_r <= alu_y;
              if (phase == PH_MU && sub == 3'd1) smu  <= alu_y;
            end
          end
        end

        S_INV: if (inv_done) state <= S_NEXT;

        S_FIN: begin
          state <= S_NEXT;
          if (phase == PH_M && col != i) state <= S_MIRROR;
          if (phase == PH_ALPHA && fp_lt(neg(acc), amin)) amin <= neg(acc);
          if (phase == PH_ALPHA2) alpha <= fp_lt(acc, ONE) ? acc : ONE;
        end

        S_MIRROR: state <= S_NEXT;

        default: begin   // S_NEXT: advance to the next element or phase
          state <= S_ELEM;
          if (!last_elem) begin
            if ((phase == PH_SJ || phase == PH_M) && col + 1'b1 < CW'(n_r))
              col <= col + 1'b1;
            else begin
              i   <= i + 1'b1;
              col <= (phase == PH_M) ? i + 1'b1 : '0;
            end
          end else begin
            i   <= '0;
            col <= '0;
            unique case (phase)
              PH_INIT:   phase <= PH_MU;
              PH_MU: begin
                if (fp_lt(mu_r, EPS_FP) || iter >= ITW'(MAX_ITER)) begin
                  state      <= S_IDLE;
                  done       <= 1'b1;
                  converged  <= fp_lt(mu_r, EPS_FP);
                  iterations <= iter;
                end else phase <= PH_D;
              end
              PH_D:      phase <= PH_R1;
              PH_R1:     phase <= PH_R2;
              PH_R2:     phase <= PH_SJ;
              PH_SJ:     phase <= PH_M;
              PH_M:      phase <= PH_RHS;
              PH_RHS:    phase <= PH_INV;
              PH_INV:    phase <= PH_DU;
              PH_DU:     phase <= PH_DL;
              PH_DL:     phase <= PH_DT;
              PH_DT: begin
                phase <= PH_ALPHA;
                amin  <= TWO;
              end
              PH_ALPHA:  phase <= PH_ALPHA2;
              PH_ALPHA2: phase <= PH_UPD;
              default: begin   // PH_UPD
                phase <= PH_MU;
                iter  <= iter + 1'b1;
              end
            endcase
          end
        end
      endcase
    end
  end

  assign busy   = (state != S_IDLE);
  assign u_data = u_m[u_idx];

  assert property (@(posedge clk) disable iff (!rst_n) start |-> (mc != '0 && n != '0))
    else $error("ipm_solver: n and mc must be at least 1");

endmodule
