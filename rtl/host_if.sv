// host_if: the byte protocol between the host computer and the solver.
//
// The host downloads one QP and reads back its solution, as the
// hardware-in-the-loop test suite of the design does. Received bytes:
//   n, mc                                  (one byte each)
//   Q  n*n words, row-major                (the Hessian)
//   c  n words                             (the linear cost)
//   J  mc*n words, row-major               (the constraint matrix)
//   g  mc words                            (the constraint bound)
// A word is the floating point value in WB = ceil(FW/8) bytes, least
// significant byte first, right-aligned (for IEEE single: the 4 bytes of a float on a
// little-endian host). Each completed word is written to the solver the
// cycle after its last byte arrives. After g the solver is started; when
// it is done, host_if sends a status byte {converged, iterations[6:0]}
// followed by the n words of u, in the same byte order. Then it waits for
// the next problem. n must be 1..NU and mc 1..MC.
//
// The order Q first, the download/read-back sequence and the transfer of
// single precision values follow the design's test suite; the header
// bytes, the order of c, J and g, the byte order and the status byte are
// choices of this implementation.
module host_if
  import mpc_pkg::*;
#(
  parameter int unsigned FW  = 32,
  parameter int unsigned NU  = 45,
  parameter int unsigned MC  = 128,
  parameter int unsigned ITW = 6,
  localparam int unsigned NIW = $clog2(NU + 1),
  localparam int unsigned MIW = $clog2(MC + 1),
  localparam int unsigned WB  = (FW + 7) / 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // from the serial receiver
  input  logic [7:0]      rx_data,
  input  logic            rx_valid,
  // to the serial transmitter
  output logic [7:0]      tx_data,
  output logic            tx_valid,
  input  logic            tx_ready,
  // to the solver
  output logic            ld_en,
  output mem_sel_e        ld_sel,
  output logic [MIW-1:0]  ld_row,
  output logic [NIW-1:0]  ld_col,
  output logic [FW-1:0]   ld_data,
  output logic [NIW-1:0]  n,
  output logic [MIW-1:0]  mc,
  output logic            start,
  input  logic            done,
  input  logic            converged,
  input  logic [ITW-1:0]  iterations,
  output logic [NIW-1:0]  u_idx,
  input  logic [FW-1:0]   u_data
);
  typedef enum logic [2:0] {
    H_N, H_MC, H_DATA, H_RUN, H_STATUS, H_UWORD, H_TXWAIT
  } host_state_e;

  host_state_e          state;
  logic [$clog2(WB+1)-1:0] nbyte;
  logic [8*WB-1:0]      word;
  logic [8*WB-1:0]      tx_word;

  // sizes of the current section
  logic [MIW-1:0] rows;
  logic [NIW-1:0] cols;

  always_comb begin
    unique case (ld_sel)
      SEL_Q:   begin rows = MIW'(n); cols = n; end
      SEL_C:   begin rows = MIW'(n); cols = NIW'(1); end
      SEL_J:   begin rows = mc;      cols = n; end
      default: begin rows = mc;      cols = NIW'(1); end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= H_N;
      nbyte     <= '0;
      word      <= '0;
      tx_word   <= '0;
      ld_en     <= 1'b0;
      ld_sel    <= SEL_Q;
      ld_row    <= '0;
      ld_col    <= '0;
      ld_data   <= '0;
      n         <= '0;
      mc        <= '0;
      start     <= 1'b0;
      tx_data   <= '0;
      tx_valid  <= 1'b0;
      u_idx     <= '0;
    end else begin
      ld_en    <= 1'b0;
      start    <= 1'b0;
      tx_valid <= 1'b0;
      // advance the write address after each written word
      if (ld_en) begin
        if (ld_col + 1'b1 < cols) ld_col <= ld_col + 1'b1;
        else begin
          ld_col <= '0;
          if (ld_row + 1'b1 < rows) ld_row <= ld_row + 1'b1;
          else begin
            ld_row <= '0;
            if (ld_sel == SEL_G) begin
              state <= H_RUN;
              start <= 1'b1;
            end else ld_sel <= mem_sel_e'(ld_sel + 1'b1);
          end
        end
      end
      unique case (state)
        H_N: if (rx_valid) begin
          n     <= NIW'(rx_data);
          state <= H_MC;
        end
        H_MC: if (rx_valid) begin
          mc     <= MIW'(rx_data);
          state  <= H_DATA;
          ld_sel <= SEL_Q;
          ld_row <= '0;
          ld_col <= '0;
          nbyte  <= '0;
        end
        H_DATA: if (rx_valid) begin
          word <= {rx_data, word[8*WB-1:8]};
          if (nbyte == ($clog2(WB+1))'(WB - 1)) begin
            nbyte   <= '0;
            ld_en   <= 1'b1;
            ld_data <= FW'({rx_data, word[8*WB-1:8]});
          end else nbyte <= nbyte + 1'b1;
        end
        H_RUN: if (done) begin
          state <= H_STATUS;
          u_idx <= '0;
        end
        H_STATUS: if (tx_ready && !tx_valid) begin
          tx_data  <= {converged, 7'(iterations)};
          tx_valid <= 1'b1;
          state    <= H_UWORD;
        end
        H_UWORD: begin   // latch the next word of u
          tx_word <= (8 * WB)'(u_data);
          nbyte   <= '0;
          state   <= H_TXWAIT;
        end
        default: begin   // H_TXWAIT: send the bytes of the word
          if (tx_ready && !tx_valid) begin
            tx_data  <= tx_word[7:0];
            tx_valid <= 1'b1;
            tx_word  <= tx_word >> 8;
            if (nbyte == ($clog2(WB+1))'(WB - 1)) begin
              nbyte <= '0;
              if (u_idx + 1'b1 < n) begin
                u_idx <= u_idx + 1'b1;
                state <= H_UWORD;
              end else state <= H_N;
            end else nbyte <= nbyte + 1'b1;
          end
        end
      endcase
    end
  end

endmodule
