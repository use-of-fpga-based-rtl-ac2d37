// tb_fix2float: self-checking test of fix2float.
// Two instances: 16-bit signed (ADC samples) and 32-bit unsigned (optical
// frequency word). Random and edge values are converted and compared with a
// reference rounding of the exact integer value to single precision; the
// one-clock latency is checked as well.
module tb_fix2float;
  import tb_f32_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        v16, v32, ov16, ov32;
  logic [15:0] d16;
  logic [31:0] d32, o16, o32;

  fix2float #(.W(16), .SIGNED(1'b1)) dut16 (.clk, .rst_n, .in_valid(v16), .in_data(d16), .out_valid(ov16), .out_data(o16));
  fix2float #(.W(32), .SIGNED(1'b0)) dut32 (.clk, .rst_n, .in_valid(v32), .in_data(d32), .out_valid(ov32), .out_data(o32));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic do16(input logic signed [15:0] v);
    @(negedge clk); v16 = 1'b1; d16 = v;
    @(negedge clk); v16 = 1'b0;
    checks++; if (!ov16) begin failures++; $display("FAIL latency 16"); end
    check($sformatf("s16 %0d", v), o16, r2f(real'(v)));
  endtask

  task automatic do32(input logic [31:0] v);
    @(negedge clk); v32 = 1'b1; d32 = v;
    @(negedge clk); v32 = 1'b0;
    checks++; if (!ov32) begin failures++; $display("FAIL latency 32"); end
    check($sformatf("u32 %0d", v), o32, r2f(real'(longint'(v))));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v16 = 0; v32 = 0; d16 = 0; d32 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do16(16'sd0); do16(16'sd1); do16(-16'sd1); do16(16'sd32767); do16(-16'sd32768); do16(16'sd12345);
    do32(32'd0); do32(32'd1); do32(32'hFFFF_FFFF); do32(32'h0100_0001); do32(32'h0100_0003); do32(32'h8000_0000);
    for (int i = 0; i < 500; i++) begin
      do16(16'($urandom));
      do32($urandom >> $urandom_range(31));
    end
    // back-to-back stream
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      v16 = 1'b1; d16 = 16'(i * 1000 - 1500);
      @(negedge clk);
      check("stream", o16, r2f(real'(i * 1000 - 1500)));
    end
    v16 = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
