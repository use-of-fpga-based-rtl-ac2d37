// si_converter: scales a floating-point sample to an SI base unit.
//
// out = in * SCALE, in IEEE 754 single precision, one register stage. The CEL
// keeps every floating-point quantity in SI base units; this block turns
// converter codes into volts (ADC path, default 10 V / 32768 per code for the
// +-10 V input range) or into hertz (optical path, 200 MHz / 2^32 per LSB, the
// 47 mHz resolution of the frequency word). The scale values are derived from
// the input ranges; the single-multiplier form is this design's choice.
module si_converter
  import cel_pkg::*;
#(
  parameter f32_t SCALE = 32'h39A0_0000  // 10/32768 V per code
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  f32_t in_data,
  output logic out_valid,
  output f32_t out_data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= F32_ZERO;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= f32_mul(in_data, SCALE);
    end
  end
endmodule
