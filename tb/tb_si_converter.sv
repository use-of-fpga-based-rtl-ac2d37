// tb_si_converter: self-checking test of si_converter.
// The ADC scaling (10 V / 32768 per code) and the optical scaling
// (200 MHz / 2^32 per LSB) are applied to random floats and to exact codes;
// results are compared with the exactly rounded double-precision product, and
// the one-clock latency is checked.
module tb_si_converter;
  import tb_f32_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        iv, ovv, ovh;
  logic [31:0] din, ov, oh;

  si_converter                              dut_v (.clk, .rst_n, .in_valid(iv), .in_data(din), .out_valid(ovv), .out_data(ov));
  si_converter #(.SCALE(32'h3D3E_BC20))     dut_h (.clk, .rst_n, .in_valid(iv), .in_data(din), .out_valid(ovh), .out_data(oh));

  task automatic run(input logic [31:0] a);
    @(negedge clk); iv = 1'b1; din = a;
    @(negedge clk); iv = 1'b0;
    checks += 3;
    if (!ovv || !ovh) begin failures++; $display("FAIL latency"); end
    if (ov !== r2f(f2r(a) * 10.0 / 32768.0)) begin
      failures++; $display("FAIL volt %h -> %h exp %h", a, ov, r2f(f2r(a) * 10.0 / 32768.0));
    end
    if (oh !== r2f(f2r(a) * f2r(32'h3D3E_BC20))) begin
      failures++; $display("FAIL hz %h -> %h", a, oh);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(r2f(32767.0));      // full-scale ADC code
    run(r2f(-32768.0));
    run(32'h0);
    for (int i = 0; i < 1000; i++) run(rand_f32(-20, 31));
    // known values: 16384 codes = 5 V; word 2^31 = 100 MHz
    run(r2f(16384.0));
    checks++; if (ov !== r2f(5.0)) begin failures++; $display("FAIL 5 V"); end
    run(r2f(2147483648.0));
    checks++; if (oh !== r2f(100.0e6)) begin failures++; $display("FAIL 100 MHz %h", oh); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
