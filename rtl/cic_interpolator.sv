// cic_interpolator: N-stage cascaded integrator-comb interpolator with gain correction.
//
// Raises the sample rate from the 250 kHz processing rate back to the 100 MHz
// DAC clock (factor R = 400). Each in_valid (expected once every R clocks) runs
// the N differentiators once; the clock after, their output is fed into the
// integrator chain, which otherwise receives zeros (zero stuffing) and runs
// every clock. The integrator output is multiplied by GMUL/2^GSH, which cancels
// the interpolator gain R^(N-1) and scales by 2^(OUT_W-IN_W), rounded and
// saturated: a constant input code d settles to d * 2^(OUT_W-IN_W), so the
// 16-bit stream becomes the 14-bit DAC code. out_data changes every clock.
// Filter type and rates follow the CEL; N, zero stuffing, gain correction and
// rounding are this design's choices.
module cic_interpolator #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 14,
  parameter int unsigned R     = 400,
  parameter int unsigned N     = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic signed [OUT_W-1:0] out_data
);
  localparam longint unsigned RN   = longint'(R) ** N;
  localparam longint unsigned RG   = longint'(R) ** (N - 1);  // DC gain
  localparam int unsigned     WI   = IN_W + $clog2(RN);
  localparam int unsigned     GSH  = $clog2(RG) + 16;
  localparam longint unsigned GMUL = ((longint'(1) << GSH) + RG / 2) / RG
                                     >> (IN_W - OUT_W);
  localparam int unsigned     WP   = WI + 24;

  logic signed [WI-1:0] dly   [N];
  logic signed [WI-1:0] comb  [N+1];
  logic signed [WI-1:0] comb_q;
  logic                 comb_v;
  logic signed [WI-1:0] integ [N];
  logic signed [WP-1:0] prod;
  logic signed [WP-1:0] shifted;

  always_comb begin
    comb[0] = WI'(in_data);
    for (int k = 0; k < N; k++) comb[k+1] = comb[k] - dly[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) dly[k] <= '0;
      comb_q <= '0;
      comb_v <= 1'b0;
    end else begin
      comb_v <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < N; k++) dly[k] <= comb[k];
        comb_q <= comb[N];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) integ[k] <= '0;
      prod     <= '0;
      out_data <= '0;
    end else begin
      integ[0] <= integ[0] + (comb_v ? comb_q : '0);
      for (int k = 1; k < N; k++) integ[k] <= integ[k] + integ[k-1];
      prod <= WP'(integ[N-1]) * $signed({1'b0, 23'(GMUL)});
      if (shifted > WP'(2 ** (OUT_W - 1) - 1))
        out_data <= OUT_W'(2 ** (OUT_W - 1) - 1);
      else if (shifted < -WP'(2 ** (OUT_W - 1)))
        out_data <= OUT_W'(-(2 ** (OUT_W - 1)));
      else
        out_data <= OUT_W'(shifted);
    end
  end

  assign shifted = (prod + (WP'(1) <<< (GSH - 1))) >>> GSH;
endmodule
