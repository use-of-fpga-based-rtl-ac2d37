// cel_fpu: floating-point correction unit.
//
// Applies the characteristic-map correction z to the measured value a:
//   mode = 1 : out = a * z
//   mode = 0 : out = a + z
// The unit is a multiplier followed by an adder, each with its own register
// (latency two clocks, one sample per clock). In multiply mode the adder adds
// zero; in add mode the multiplier multiplies by one. The two operations and
// their order follow the CEL; the pipelining is this design's choice.
module cel_fpu
  import cel_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic mode,
  input  logic in_valid,
  input  f32_t a,
  input  f32_t z,
  output logic out_valid,
  output f32_t out_data
);
  logic v1;
  f32_t prod, addend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      prod      <= F32_ZERO;
      addend    <= F32_ZERO;
      out_valid <= 1'b0;
      out_data  <= F32_ZERO;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        prod   <= f32_mul(a, mode ? z : F32_ONE);
        addend <= mode ? F32_ZERO : z;
      end
      out_valid <= v1;
      if (v1) out_data <= f32_add(prod, addend);
    end
  end
endmodule
