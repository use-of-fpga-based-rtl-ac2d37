// fix2float: fixed-point to IEEE 754 single-precision converter.
//
// Converts a W-bit integer sample to a 32-bit float, one sample per clock, with
// one register stage (out_valid follows in_valid by one clock). SIGNED=1 reads
// the input as two's complement (the 16-bit ADC stream); SIGNED=0 reads it as
// unsigned (the 32-bit frequency word of the optical link). Integers wider than
// 24 bits are rounded to nearest even. The conversion itself follows the CEL
// datapath; the one-clock latency and the signedness switch are this design's.
module fix2float
  import cel_pkg::*;
#(
  parameter int unsigned W      = 16,
  parameter bit          SIGNED = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output f32_t         out_data
);
  logic        neg;
  logic [31:0] mag;

  always_comb begin
    neg = SIGNED && in_data[W-1];
    mag = 32'(in_data);
    if (neg) mag = 32'(-$signed(in_data));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= F32_ZERO;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= f32_from_int(neg, mag);
    end
  end
endmodule
