// tb_uart_tx: self-checking test of the serial transmitter.
//
// Random bytes are sent, some back to back, with 16 and with the default
// 243 clocks per bit. A monitor independent of the design watches the
// line, finds each start bit, samples every bit in its middle and checks
// the byte, the stop bit, and that a frame lasts 10 bit times.
module tb_uart_tx;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] d_a, d_b;
  logic       v_a, v_b, rdy_a, rdy_b, txd_a, txd_b;

  uart_tx #(.CLKS_PER_BIT(16)) dut_a (.clk, .rst_n, .data(d_a), .valid(v_a), .ready(rdy_a), .txd(txd_a));
  uart_tx                      dut_b (.clk, .rst_n, .data(d_b), .valid(v_b), .ready(rdy_b), .txd(txd_b));

  logic [7:0] sent_a [$];
  logic [7:0] sent_b [$];

  // line monitor: CPB clocks per bit
  task automatic monitor(input int cpb, input bit which);
    forever begin
      logic [7:0] b;
      logic       line;
      int         t0;
      line = which ? txd_b : txd_a;
      while (line !== 1'b0) begin @(posedge clk); line = which ? txd_b : txd_a; end
      repeat (cpb / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (cpb) @(posedge clk);
        b[i] = which ? txd_b : txd_a;
      end
      repeat (cpb) @(posedge clk);
      checks++;
      if ((which ? txd_b : txd_a) !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      checks++;
      if (which ? (sent_b.size() == 0 || sent_b.pop_front() != b)
                : (sent_a.size() == 0 || sent_a.pop_front() != b)) begin
        failures++; $display("FAIL byte %h", b);
      end
      // end of stop bit: line stays high for the rest of this bit
      repeat (cpb / 2 - 1) @(posedge clk);
    end
  endtask

  initial begin
    d_a = 0; d_b = 0; v_a = 0; v_b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      monitor(16, 1'b0);
      monitor(243, 1'b1);
    join_none
    for (int i = 0; i < 40; i++) begin
      int t0, t1;
      @(negedge clk);
      while (!rdy_a) @(negedge clk);
      d_a = 8'($urandom); v_a = 1'b1; sent_a.push_back(d_a);
      @(negedge clk); v_a = 1'b0;
      t0 = 0;
      while (!rdy_a) begin @(negedge clk); t0++; end
      checks++;
      if (t0 != 10 * 16) begin failures++; $display("FAIL frame took %0d cycles", t0 + 1); end
      if (i % 3 == 0) repeat ($urandom_range(1, 50)) @(negedge clk);
    end
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      while (!rdy_b) @(negedge clk);
      d_b = 8'($urandom); v_b = 1'b1; sent_b.push_back(d_b);
      @(negedge clk); v_b = 1'b0;
    end
    repeat (12 * 243) @(negedge clk);
    checks++;
    if (sent_a.size() != 0 || sent_b.size() != 0) begin
      failures++; $display("FAIL %0d/%0d bytes never seen", sent_a.size(), sent_b.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
