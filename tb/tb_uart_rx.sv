// tb_uart_rx: self-checking test of the serial receiver.
//
// A bit-banged line sends random bytes (8N1, LSB first) at 16 and at the
// default 243 clocks per bit, one frame after another,
// and checks every received byte. Frames with a low stop bit must raise
// frame_err and deliver no byte, and a short low glitch must be ignored.
module tb_uart_rx;
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

  logic       rxd_a = 1'b1, rxd_b = 1'b1;
  logic [7:0] data_a, data_b;
  logic       val_a, val_b, ferr_a, ferr_b;

  uart_rx #(.CLKS_PER_BIT(16)) dut_a (.clk, .rst_n, .rxd(rxd_a), .data(data_a), .valid(val_a), .frame_err(ferr_a));
  uart_rx                      dut_b (.clk, .rst_n, .rxd(rxd_b), .data(data_b), .valid(val_b), .frame_err(ferr_b));

  logic [7:0] exp_a [$];
  logic [7:0] exp_b [$];
  int         errs_a = 0, vals_a = 0;

  always @(posedge clk) if (rst_n) begin
    if (val_a) begin
      vals_a++;
      checks++;
      if (exp_a.size() == 0 || exp_a.pop_front() != data_a) begin
        failures++; $display("FAIL a: got %h at %0t, %0d expected left", data_a, $time, exp_a.size());
      end
    end
    if (ferr_a) errs_a++;
    if (val_b) begin
      checks++;
      if (exp_b.size() == 0 || exp_b.pop_front() != data_b) begin
        failures++; $display("FAIL b: got %h at %0t", data_b, $time);
      end
    end
  end

  task automatic frame_a(logic [7:0] b, int cpb, logic stop);
    @(negedge clk); rxd_a = 1'b0; repeat (cpb) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd_a = b[i]; repeat (cpb) @(negedge clk); end
    rxd_a = stop; repeat (cpb) @(negedge clk);
    rxd_a = 1'b1; repeat (cpb) @(negedge clk);
  endtask

  task automatic frame_b(logic [7:0] b);
    @(negedge clk); rxd_b = 1'b0; repeat (243) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd_b = b[i]; repeat (243) @(negedge clk); end
    rxd_b = 1'b1; repeat (243) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    fork
      begin
        for (int i = 0; i < 60; i++) begin
          logic [7:0] b;
          b = 8'($urandom);
          exp_a.push_back(b);
          frame_a(b, 16, 1'b1);
        end
        // bad stop bit
        frame_a(8'h55, 16, 1'b0);
        repeat (40) @(negedge clk);
        // glitch
        @(negedge clk); rxd_a = 1'b0; repeat (3) @(negedge clk); rxd_a = 1'b1;
        repeat (40) @(negedge clk);
        exp_a.push_back(8'hC3);
        frame_a(8'hC3, 16, 1'b1);
      end
      begin
        for (int i = 0; i < 5; i++) begin
          logic [7:0] b;
          b = 8'($urandom);
          exp_b.push_back(b);
          frame_b(b);
        end
      end
    join
    repeat (100) @(negedge clk);
    checks++;
    if (exp_a.size() != 0 || exp_b.size() != 0 || errs_a != 1 || vals_a != 61) begin
      failures++;
      $display("FAIL left %0d/%0d, frame errors %0d, bytes %0d", exp_a.size(), exp_b.size(), errs_a, vals_a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
