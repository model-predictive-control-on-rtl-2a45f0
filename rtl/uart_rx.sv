// uart_rx: RS232 serial receiver, 8 data bits, no parity, one stop bit,
// least significant bit first.
//
// The line is synchronised by two flip-flops. A falling edge starts a
// frame; the start bit is confirmed at its middle and each data bit is
// sampled CLKS_PER_BIT cycles later, in the middle of its bit time. When
// the stop bit is sampled high, data is presented with a one-cycle valid
// pulse; a low stop bit drops the byte and pulses frame_err instead.
// The default CLKS_PER_BIT = 243 gives 115200 baud from the 28 MHz system
// clock of the design; the baud rate and frame format are choices of this
// implementation, the link itself is the host link of the design.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 243
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rx_state_e;

  rx_state_e      state;
  logic [1:0]     sync;
  logic [CW-1:0]  cnt;
  logic [2:0]     bit_idx;
  logic [7:0]     shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= R_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        R_IDLE: begin
          if (!sync[1]) begin
            state <= R_START;
            cnt   <= CW'(CLKS_PER_BIT / 2);
          end
        end
        R_START: begin
          if (cnt == '0) begin
            if (!sync[1]) begin
              state   <= R_DATA;
              cnt     <= CW'(CLKS_PER_BIT - 1);
              bit_idx <= '0;
            end else state <= R_IDLE;   // glitch, not a start bit
          end else cnt <= cnt - 1'b1;
        end
        R_DATA: begin
          if (cnt == '0) begin
            shreg   <= {sync[1], shreg[7:1]};
            cnt     <= CW'(CLKS_PER_BIT - 1);
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= R_STOP;
          end else cnt <= cnt - 1'b1;
        end
        default: begin   // R_STOP
          if (cnt == '0) begin
            state <= R_IDLE;
            if (sync[1]) begin
              data  <= shreg;
              valid <= 1'b1;
            end else frame_err <= 1'b1;
          end else cnt <= cnt - 1'b1;
        end
      endcase
    end
  end
endmodule
