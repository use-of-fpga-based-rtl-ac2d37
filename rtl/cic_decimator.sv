// cic_decimator: N-stage cascaded integrator-comb decimator with gain correction.
//
// Reduces the ADC sample rate by R (default 100 MHz / 250 kHz = 400), so that
// the signal processing behind it runs at the 250 kHz Nyquist rate of the
// DC..100 kHz band. N integrators run at the input rate (one sample per
// in_valid), every R-th input the N differentiators (differential delay 1) run
// once, and the result is multiplied by GMUL/2^GSH, rounded and saturated.
// GMUL cancels the CIC DC gain R^N and adds 2^(OUT_W-IN_W), so a DC input code d
// gives the output code d * 2^(OUT_W-IN_W): the 14-bit ADC code grows to 16 bit.
// out_valid pulses once per R input samples, three clocks after the R-th one.
// The CIC filter type and the rates follow the CEL; N, the gain correction and
// the rounding are this design's choices.
module cic_decimator #(
  parameter int unsigned IN_W  = 14,
  parameter int unsigned OUT_W = 16,
  parameter int unsigned R     = 400,
  parameter int unsigned N     = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);
  localparam longint unsigned RN   = longint'(R) ** N;
  localparam int unsigned     GROW = $clog2(RN);
  localparam int unsigned     WI   = IN_W + GROW;          // integrator width
  localparam int unsigned     GSH  = GROW + 16;
  localparam longint unsigned GMUL =
      ((longint'(1) << (GSH + OUT_W - IN_W)) + RN / 2) / RN;
  localparam int unsigned     WP   = WI + 24;              // product width

  logic signed [WI-1:0] integ [N];
  logic signed [WI-1:0] dly   [N];
  logic signed [WI-1:0] comb  [N+1];
  logic signed [WI-1:0] comb_q;
  logic [$clog2(R)-1:0] cnt;
  logic                 dec, comb_v, prod_v;
  logic signed [WP-1:0] prod;
  logic signed [WP-1:0] shifted;

  // Integrators, pipelined: each stage adds the previous stage's register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) integ[k] <= '0;
      cnt <= '0;
    end else if (in_valid) begin
      integ[0] <= integ[0] + WI'(in_data);
      for (int k = 1; k < N; k++) integ[k] <= integ[k] + integ[k-1];
      cnt <= (cnt == $clog2(R)'(R - 1)) ? '0 : cnt + 1'b1;
    end
  end

  assign dec = in_valid && (cnt == $clog2(R)'(R - 1));

  // Differentiators at the decimated rate.
  always_comb begin
    comb[0] = integ[N-1];
    for (int k = 0; k < N; k++) comb[k+1] = comb[k] - dly[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) dly[k] <= '0;
      comb_q <= '0;
      comb_v <= 1'b0;
    end else begin
      comb_v <= dec;
      if (dec) begin
        for (int k = 0; k < N; k++) dly[k] <= comb[k];
        comb_q <= comb[N];
      end
    end
  end

  // Gain correction, rounding and saturation.
  assign shifted = (prod + (WP'(1) <<< (GSH - 1))) >>> GSH;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod      <= '0;
      prod_v    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      prod_v <= comb_v;
      if (comb_v) prod <= WP'(comb_q) * $signed({1'b0, 23'(GMUL)});
      out_valid <= prod_v;
      if (prod_v) begin
        if (shifted > WP'(2 ** (OUT_W - 1) - 1))
          out_data <= OUT_W'(2 ** (OUT_W - 1) - 1);
        else if (shifted < -WP'(2 ** (OUT_W - 1)))
          out_data <= OUT_W'(-(2 ** (OUT_W - 1)));
        else
          out_data <= OUT_W'(shifted);
      end
    end
  end
endmodule
