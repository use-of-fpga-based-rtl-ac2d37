// tb_cel_fpu: self-checking test of cel_fpu.
// Multiply mode is compared with the exactly rounded product, add mode with the
// double-precision sum rounded to single (at most 1 ulp apart, as double
// rounding may differ in rare ties). Also checks the two-clock latency,
// back-to-back operation and a mode change between samples.
module tb_cel_fpu;
  import tb_f32_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        mode, iv, ov;
  logic [31:0] a, z, o;

  cel_fpu dut (.clk, .rst_n, .mode, .in_valid(iv), .a, .z, .out_valid(ov), .out_data(o));

  function automatic logic [31:0] expect_of(input logic m, input logic [31:0] x, input logic [31:0] y);
    return m ? r2f(f2r(x) * f2r(y)) : r2f(f2r(x) + f2r(y));
  endfunction

  task automatic run(input logic m, input logic [31:0] x, input logic [31:0] y);
    logic [31:0] e;
    e = expect_of(m, x, y);
    @(negedge clk); iv = 1'b1; mode = m; a = x; z = y;
    @(negedge clk); iv = 1'b0; mode = ~m;
    checks++; if (ov) begin failures++; $display("FAIL early valid"); end
    @(negedge clk);
    checks++; if (!ov) begin failures++; $display("FAIL latency"); end
    checks++;
    if ((m && ulp_diff(o, e) != 0) || (!m && ulp_diff(o, e) > 1)) begin
      failures++; $display("FAIL mode %0d %h %h -> %h exp %h", m, x, y, o, e);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ea [8];

  initial begin
    iv = 0; mode = 0; a = 0; z = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(1'b1, r2f(2.5), r2f(1.02));
    run(1'b0, r2f(2.5), r2f(-0.125));
    run(1'b0, r2f(2.5), r2f(-2.5));
    run(1'b1, r2f(-3.0), 32'h0);
    for (int i = 0; i < 1500; i++) begin
      run(1'b1, rand_f32(-10, 10), rand_f32(-10, 10));
      run(1'b0, rand_f32(-6, 6), rand_f32(-6, 6));
      run(1'b0, rand_f32(-3, 3), rand_f32(-30, 3));
    end
    // back-to-back stream with alternating modes
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      iv = 1'b1; mode = i[0]; a = r2f(real'(i) + 0.5); z = r2f(1.0 + 0.01 * real'(i));
      ea[i] = expect_of(mode, a, z);
      if (i >= 2) begin
        checks++;
        if (!ov || ulp_diff(o, ea[i-2]) > 1) begin failures++; $display("FAIL stream %0d", i); end
      end
    end
    @(negedge clk); iv = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
