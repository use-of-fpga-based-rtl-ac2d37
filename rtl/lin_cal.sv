// lin_cal: linear gain/offset calibration of a fixed-point sample stream.
//
// out = GCC * in + OCC (Eq. "output = GCC * input + OCC"), used once behind the
// ADC decimator and once in front of the DAC interpolator to remove offset and
// gain errors of the converters. All quantities are 16-bit fixed point: GCC is
// signed Q2.14 (16384 = 1.0), OCC is in units of the data LSB. Stage 1
// multiplies, stage 2 shifts (arithmetic, i.e. rounds toward minus infinity),
// adds OCC and saturates; out_valid follows in_valid by two clocks and one
// sample per clock is accepted. The equation and the 16-bit pipelined
// arithmetic follow the CEL; the Q2.14 format, the pipeline depth and the
// saturation are this design's choices.
module lin_cal #(
  parameter int unsigned W        = 16,
  parameter int unsigned GCC_FRAC = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  input  logic signed [W-1:0] gcc,
  input  logic signed [W-1:0] occ,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);
  localparam logic signed [W+2:0] MAXV = (W+3)'(2 ** (W - 1) - 1);
  localparam logic signed [W+2:0] MINV = -(W+3)'(2 ** (W - 1));

  logic                  v1;
  logic signed [2*W-1:0] prod;
  logic signed [W-1:0]   occ_q;
  logic signed [W+2:0]   sum;

  always_comb sum = (W+3)'(prod >>> GCC_FRAC) + (W+3)'(occ_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      prod      <= '0;
      occ_q     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        prod  <= in_data * gcc;
        occ_q <= occ;
      end
      out_valid <= v1;
      if (v1) begin
        if (sum > MAXV)      out_data <= W'(MAXV);
        else if (sum < MINV) out_data <= W'(MINV);
        else                 out_data <= W'(sum);
      end
    end
  end
endmodule
