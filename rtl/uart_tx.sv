// uart_tx: RS232 serial transmitter, 8 data bits, no parity, one stop bit,
// least significant bit first.
//
// When ready is high, a cycle with valid high takes data and starts a
// frame: start bit (low), eight data bits, stop bit (high), each
// CLKS_PER_BIT cycles long. ready is low for the whole frame, so one frame
// takes 10 * CLKS_PER_BIT cycles and bytes can follow back to back. The
// line idles high. The default 243 cycles per bit is 115200 baud at the
// design's 28 MHz clock, a choice of this implementation.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 243
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    frame;     // stop, data[7:0], start -- shifted out LSB first
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;

  assign ready = (bits_left == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      txd       <= 1'b1;
    end else begin
      if (ready) begin
        txd <= 1'b1;
        if (valid) begin
          frame     <= {1'b1, data, 1'b0};
          bits_left <= 4'd10;
          cnt       <= CW'(CLKS_PER_BIT - 1);
          txd       <= 1'b0;
        end
      end else if (cnt == '0) begin
        bits_left <= bits_left - 1'b1;
        cnt       <= CW'(CLKS_PER_BIT - 1);
        frame     <= {1'b1, frame[9:1]};
        txd       <= (bits_left == 4'd1) ? 1'b1 : frame[1];
      end else cnt <= cnt - 1'b1;
    end
  end
endmodule
