// tb_fp_alu: self-checking test of the floating point unit in both formats
// of the design, IEEE single (8,23) and the reduced (9,18) format.
//
// Each operation is checked against a reference computed in double
// precision and rounded to the format by tb_fp_pkg: add, subtract and
// multiply must be bit exact (their exact results fit a double), divide
// and the two multiply-accumulates may differ by one unit in the last
// place (double rounding in the reference; two roundings in the MAC).
// Fixed cases with known IEEE single encodings and the latencies (one
// cycle for add/mul, MAN_W+9 cycles for divide) are checked too.
module tb_fp_alu;
  import mpc_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // IEEE single
  logic        s_start, s_busy, s_done;
  fp_op_e      s_op;
  logic [31:0] s_a, s_b, s_c, s_y;
  fp_alu #(.EXP_W(8), .MAN_W(23)) dut_s (
    .clk, .rst_n, .start(s_start), .op(s_op), .a(s_a), .b(s_b), .c(s_c),
    .busy(s_busy), .done(s_done), .y(s_y));

  // reduced (9,18)
  logic        r_start, r_busy, r_done;
  fp_op_e      r_op;
  logic [27:0] r_a, r_b, r_c, r_y;
  fp_alu #(.EXP_W(9), .MAN_W(18)) dut_r (
    .clk, .rst_n, .start(r_start), .op(r_op), .a(r_a), .b(r_b), .c(r_c),
    .busy(r_busy), .done(r_done), .y(r_y));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ref_op(fp_op_e op, real a, real b, real c);
    case (op)
      FP_ADD:  return a + b;
      FP_SUB:  return a - b;
      FP_MUL:  return a * b;
      FP_DIV:  return a / b;
      default: return 0.0;
    endcase
  endfunction

  // run one operation on the selected unit, return result and latency
  task automatic run(input bit single, input fp_op_e op, input logic [63:0] a, b, c,
                     output logic [63:0] y, output int lat);
    lat = 0;
    @(negedge clk);
    if (single) begin
      s_op = op; s_a = a[31:0]; s_b = b[31:0]; s_c = c[31:0]; s_start = 1'b1;
      @(negedge clk); s_start = 1'b0; lat = 1;
      while (!s_done) begin @(negedge clk); lat++; end
      y = 64'(s_y);
    end else begin
      r_op = op; r_a = a[27:0]; r_b = b[27:0]; r_c = c[27:0]; r_start = 1'b1;
      @(negedge clk); r_start = 1'b0; lat = 1;
      while (!r_done) begin @(negedge clk); lat++; end
      y = 64'(r_y);
    end
  endtask

  task automatic check_op(input bit single, input fp_op_e op, input real ra, rb, rc);
    int ew, mw, lat, tol;
    logic [63:0] a, b, c, y, exp_w;
    real ar, br, cr, prod_r;
    ew = single ? 8 : 9;
    mw = single ? 23 : 18;
    a = real_to_fp(ra, ew, mw);
    b = real_to_fp(rb, ew, mw);
    c = real_to_fp(rc, ew, mw);
    ar = fp_to_real(a, ew, mw);
    br = fp_to_real(b, ew, mw);
    cr = fp_to_real(c, ew, mw);
    if (op == FP_MAC || op == FP_NMAC) begin
      prod_r = fp_to_real(real_to_fp(ar * br, ew, mw), ew, mw);
      exp_w  = real_to_fp((op == FP_MAC) ? cr + prod_r : cr - prod_r, ew, mw);
      tol = 1;
    end else begin
      exp_w = real_to_fp(ref_op(op, ar, br, cr), ew, mw);
      tol = (op == FP_DIV) ? 1 : 0;
    end
    run(single, op, a, b, c, y, lat);
    checks++;
    if (ulp_dist(y, exp_w, ew, mw) > longint'(tol)) begin
      failures++;
      $display("FAIL fmt(%0d,%0d) op=%s a=%g b=%g c=%g got %h (%g) want %h (%g)",
               ew, mw, op.name(), ar, br, cr, y, fp_to_real(y, ew, mw), exp_w,
               fp_to_real(exp_w, ew, mw));
    end
    checks++;
    if (lat != ((op == FP_DIV) ? mw + 9 : 1)) begin
      failures++;
      $display("FAIL latency op=%s: %0d cycles", op.name(), lat);
    end
  endtask

  function automatic real rnd_val();
    real m;
    int  e;
    m = real'($urandom_range(1, 1000000)) / 1000.0;
    e = int'($urandom_range(0, 20)) - 10;
    m = m * (2.0 ** e);
    return ($urandom_range(0, 1) == 1) ? -m : m;
  endfunction

  task automatic check_bits(input fp_op_e op, input logic [31:0] a, b, c, want);
    logic [63:0] y;
    int lat;
    run(1'b1, op, 64'(a), 64'(b), 64'(c), y, lat);
    checks++;
    if (y[31:0] != want) begin
      failures++;
      $display("FAIL fixed op=%s %h %h %h: got %h want %h", op.name(), a, b, c, y[31:0], want);
    end
  endtask

  initial begin
    s_start = 0; r_start = 0; s_op = FP_ADD; r_op = FP_ADD;
    s_a = 0; s_b = 0; s_c = 0; r_a = 0; r_b = 0; r_c = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // known IEEE single encodings
    check_bits(FP_ADD, 32'h3DCCCCCD, 32'h3E4CCCCD, 0, 32'h3E99999A);  // 0.1 + 0.2
    check_bits(FP_MUL, 32'h3FC00000, 32'h40000000, 0, 32'h40400000);  // 1.5 * 2
    check_bits(FP_DIV, 32'h3F800000, 32'h40400000, 0, 32'h3EAAAAAB);  // 1 / 3
    check_bits(FP_SUB, 32'h40400000, 32'h40400000, 0, 32'h00000000);  // 3 - 3
    check_bits(FP_MAC, 32'h40000000, 32'h40400000, 32'h3F800000, 32'h40E00000); // 1 + 2*3
    check_bits(FP_NMAC, 32'h40000000, 32'h40400000, 32'h3F800000, 32'hC0A00000); // 1 - 2*3
    check_bits(FP_MUL, 32'h00000000, 32'h40400000, 0, 32'h00000000);  // 0 * 3
    check_bits(FP_ADD, 32'h00000000, 32'hC0400000, 0, 32'hC0400000);  // 0 + -3
    for (int i = 0; i < 400; i++) begin
      fp_op_e op;
      op = fp_op_e'($urandom_range(0, 5));
      check_op(1'b1, op, rnd_val(), rnd_val(), rnd_val());
      check_op(1'b0, op, rnd_val(), rnd_val(), rnd_val());
    end
    // cancellation-heavy additions
    for (int i = 0; i < 100; i++) begin
      real x;
      x = rnd_val();
      check_op(1'b1, FP_SUB, x, x * (1.0 + real'($urandom_range(1, 100)) * 1e-6), 0.0);
      check_op(1'b0, FP_ADD, x, -x * (1.0 + real'($urandom_range(1, 100)) * 1e-5), 0.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
