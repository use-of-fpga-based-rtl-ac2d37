// float2fix: floating-point to fixed-point converter with scaling.
//
// out = round(in * SCALE), saturated to W bits (two's complement if SIGNED,
// otherwise unsigned with negative values clipped to 0). Rounding is half away
// from zero. Stage 1 multiplies by SCALE, stage 2 converts; out_valid follows
// in_valid by two clocks. The default scale turns volts back into 16-bit DAC
// codes for the +-10 V range (3276.8 codes per volt). Putting the unit scaling
// inside the converter is this design's choice.
module float2fix
  import cel_pkg::*;
#(
  parameter int unsigned W      = 16,
  parameter bit          SIGNED = 1'b1,
  parameter f32_t        SCALE  = 32'h454C_CCCD  // 3276.8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  f32_t         in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);
  logic        v1;
  f32_t        scaled;
  logic [63:0] conv;

  assign conv = f32_to_int(scaled, int'(W), SIGNED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      scaled    <= F32_ZERO;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) scaled <= f32_mul(in_data, SCALE);
      out_valid <= v1;
      if (v1) out_data <= conv[W-1:0];
    end
  end
endmodule
