// mat_inv: floating point matrix inversion core.
//
// Inverts an n x n matrix (n <= N, set at run time) in place by
// Gauss-Jordan elimination without pivoting, for the symmetric positive
// definite matrices of the interior point solver, whose pivots are always
// positive. For every pivot p: inv = 1/A[p][p]; row p is scaled by inv;
// every other row r has A[r][p] times row p subtracted from it and
// A[r][p] replaced by -A[r][p]*inv; finally A[p][p] = inv. After n pivots
// the array holds the inverse. All arithmetic goes through one fp_alu,
// one operation at a time, so the core is small and its run time is about
// 2*n^3 cycles plus n divisions.
//
// Interface: while idle, the matrix is written through wr_* (row-major
// addressing by row and column). A one-cycle start pulse begins the
// inversion; busy is high until done pulses. The result (or the loaded
// matrix) is read combinationally through rd_row/rd_col/rd_data.
//
// The core's existence and its role (inverting the reduced Newton matrix,
// 128 x 128 as its benchmark size) follow the design description; the
// Gauss-Jordan scheme, the absence of pivoting and the interface are
// choices of this implementation.
module mat_inv
  import mpc_pkg::*;
#(
  parameter int unsigned EXP_W = FP_EXP_W,
  parameter int unsigned MAN_W = FP_MAN_W,
  parameter int unsigned N     = 128,
  localparam int unsigned FW   = EXP_W + MAN_W + 1,
  localparam int unsigned IW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned NW   = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NW-1:0] n,
  input  logic          wr_en,
  input  logic [IW-1:0] wr_row,
  input  logic [IW-1:0] wr_col,
  input  logic [FW-1:0] wr_data,
  input  logic [IW-1:0] rd_row,
  input  logic [IW-1:0] rd_col,
  output logic [FW-1:0] rd_data,
  input  logic          start,
  output logic          busy,
  output logic          done
);
  localparam logic [FW-1:0] ONE = {1'b0, 1'b0, {(EXP_W-1){1'b1}}, {MAN_W{1'b0}}};

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_PIVSET} state_e;
  typedef enum logic [1:0] {P_DIV, P_SCALE, P_ELIM, P_COL} phase_e;

  logic [FW-1:0] mem [N*N];

  state_e          state;
  phase_e          phase;
  logic [IW-1:0]   p, r, j;
  logic [FW-1:0]   inv;

  // floating point unit
  logic            alu_start, alu_done;
  fp_op_e          alu_op;
  logic [FW-1:0]   alu_a, alu_b, alu_c, alu_y;

  fp_alu #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_alu (
    .clk, .rst_n, .start(alu_start), .op(alu_op), .a(alu_a), .b(alu_b), .c(alu_c),
    .busy(), .done(alu_done), .y(alu_y)
  );

  function automatic int unsigned addr(logic [IW-1:0] row, logic [IW-1:0] col);
    return int'(row) * N + int'(col);
  endfunction

  // next index after x that is not the pivot; n (or more) when none is left
  function automatic logic [NW:0] nxt(logic [IW-1:0] x, logic [IW-1:0] piv);
    logic [NW:0] v;
    v = (NW+1)'(x) + 1'b1;
    if (v == (NW+1)'(piv)) v = v + 1'b1;
    return v;
  endfunction

  logic [IW-1:0] first;      // first index that is not the pivot
  logic [NW:0]   j_nxt, r_nxt, p_nxt;
  logic [FW-1:0] a_rp, a_pj, a_rj, a_pp;

  always_comb begin
    first = (p == '0) ? IW'(1) : '0;
    j_nxt = nxt(j, p);
    r_nxt = nxt(r, p);
    p_nxt = (NW+1)'(p) + 1'b1;
    a_rp  = mem[addr(r, p)];
    a_pj  = mem[addr(p, j)];
    a_rj  = mem[addr(r, j)];
    a_pp  = mem[addr(p, p)];
    rd_data = mem[addr(rd_row, rd_col)];
  end

  always_comb begin
    alu_start = (state == S_ISSUE);
    alu_c     = a_rj;
    unique case (phase)
      P_DIV:   begin alu_op = FP_DIV;  alu_a = ONE;  alu_b = a_pp; end
      P_SCALE: begin alu_op = FP_MUL;  alu_a = a_pj; alu_b = inv;  end
      P_ELIM:  begin alu_op = FP_NMAC; alu_a = a_rp; alu_b = a_pj; end
      default: begin alu_op = FP_MUL;  alu_a = a_rp; alu_b = inv;  end
    endcase
  end

  always_ff @(posedge clk) begin
    if (state == S_IDLE && wr_en)
      mem[addr(wr_row, wr_col)] <= wr_data;
    else if (state == S_WAIT && alu_done) begin
      unique case (phase)
        P_SCALE: mem[addr(p, j)] <= alu_y;
        P_ELIM:  mem[addr(r, j)] <= alu_y;
        P_COL:   mem[addr(r, p)] <= {~alu_y[FW-1], alu_y[FW-2:0]};
        default: ;
      endcase
    end else if (state == S_PIVSET)
      mem[addr(p, p)] <= inv;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      phase <= P_DIV;
      p     <= '0;
      r     <= '0;
      j     <= '0;
      inv   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            p     <= '0;
            phase <= P_DIV;
            state <= (n == '0) ? S_IDLE : S_ISSUE;
            done  <= (n == '0);
          end
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: begin
          if (alu_done) begin
            state <= S_ISSUE;
            unique case (phase)
              P_DIV: begin
                inv <= alu_y;
                j   <= first;
                if ((NW+1)'(first) >= (NW+1)'(n)) state <= S_PIVSET;   // 1 x 1
                else phase <= P_SCALE;
              end
              P_SCALE: begin
                if (j_nxt >= (NW+1)'(n)) begin
                  phase <= P_ELIM;
                  r     <= first;
                  j     <= first;
                end else j <= j_nxt[IW-1:0];
              end
              P_ELIM: begin
                if (j_nxt >= (NW+1)'(n)) phase <= P_COL;
                else j <= j_nxt[IW-1:0];
              end
              default: begin   // P_COL: row r finished
                if (r_nxt >= (NW+1)'(n)) state <= S_PIVSET;
                else begin
                  r     <= r_nxt[IW-1:0];
                  j     <= first;
                  phase <= P_ELIM;
                end
              end
            endcase
          end
        end
        default: begin   // S_PIVSET: pivot p finished
          phase <= P_DIV;
          if (p_nxt >= (NW+1)'(n)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            p     <= p_nxt[IW-1:0];
            state <= S_ISSUE;
          end
        end
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && busy))
    else $error("mat_inv: write while inverting");

endmodule
