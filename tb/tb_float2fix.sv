// tb_float2fix: self-checking test of float2fix.
// Instance 1 turns volts into signed 16-bit DAC codes (3276.8 codes/V), instance
// 2 turns values into unsigned 32-bit words (2^32 / 200 MHz). Results are
// compared with the reference: single-precision product, rounded half away from
// zero and saturated. The two-clock latency is checked.
module tb_float2fix;
  import tb_f32_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam logic [31:0] SC16 = 32'h454C_CCCD;
  localparam logic [31:0] SC32 = 32'h41AB_CC77;

  logic        iv, ov16, ov32;
  logic [31:0] din, o32;
  logic [15:0] o16;

  float2fix                                          dut16 (.clk, .rst_n, .in_valid(iv), .in_data(din), .out_valid(ov16), .out_data(o16));
  float2fix #(.W(32), .SIGNED(1'b0), .SCALE(SC32))   dut32 (.clk, .rst_n, .in_valid(iv), .in_data(din), .out_valid(ov32), .out_data(o32));

  function automatic longint ref16(input logic [31:0] f);
    longint r;
    r = round_away(f2r(r2f(f2r(f) * f2r(SC16))));
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  function automatic longint ref32(input logic [31:0] f);
    longint r;
    r = round_away(f2r(r2f(f2r(f) * f2r(SC32))));
    if (r < 0) r = 0;
    else if (r > 64'sd4294967295) r = 64'sd4294967295;
    return r;
  endfunction

  task automatic run(input logic [31:0] f);
    @(negedge clk); iv = 1'b1; din = f;
    @(negedge clk); iv = 1'b0;
    checks++; if (ov16) begin failures++; $display("FAIL early"); end
    @(negedge clk);
    checks++; if (!ov16 || !ov32) begin failures++; $display("FAIL latency"); end
    checks += 2;
    if ($signed(o16) != 16'(ref16(f))) begin failures++; $display("FAIL 16: %h -> %0d exp %0d", f, $signed(o16), ref16(f)); end
    if (o32 != 32'(ref32(f))) begin failures++; $display("FAIL 32: %h -> %0d exp %0d", f, o32, ref32(f)); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(r2f(5.0));
    checks++; if ($signed(o16) != 16384) begin failures++; $display("FAIL 5 V -> %0d", $signed(o16)); end
    run(r2f(-10.0));      // -32768
    run(r2f(10.5));       // saturates
    run(r2f(-11.0));
    run(r2f(1.0e9));      // 32-bit saturates
    run(r2f(100.0e6));
    checks++; if (o32 != 32'h8000_0000) begin failures++; $display("FAIL 100 MHz -> %h", o32); end
    run(32'h0);
    for (int i = 0; i < 1000; i++) run(rand_f32(-12, 4));
    for (int i = 0; i < 500; i++) run(rand_f32(-3, 28));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
