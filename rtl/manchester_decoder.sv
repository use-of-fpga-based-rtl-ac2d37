// manchester_decoder: serial Manchester receiver for the optical direct link.
//
// Receives the frames of manchester_encoder: line idle low, a start bit '0'
// (high then low), then FRAME_W = 40 bits MSB first, each 2*CLKS_PER_HALF clocks
// long, '0' = high then low, '1' = low then high. The line is synchronised by two
// flip-flops. A rising edge in idle marks the start of the start bit; from there
// each half bit is sampled at its middle, the second-half sample gives the bit,
// and equal halves (or a wrong start bit) set code_err. frame_valid pulses one
// clock after the middle of the last half bit, with header = frame[39:32] and
// payload = frame[31:0]. Sender and receiver are assumed to run from clocks of
// the same frequency (no clock recovery). Manchester decoding of 40-bit frames
// follows the CEL; the frame layout, line code and sampling scheme are this
// design's choices.
module manchester_decoder #(
  parameter int unsigned CLKS_PER_HALF = 4,
  parameter int unsigned FRAME_W       = 40
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               rx,
  output logic               frame_valid,
  output logic [7:0]         header,
  output logic [FRAME_W-9:0] payload,
  output logic               code_err
);
  localparam int unsigned NBITS = FRAME_W + 1;
  localparam int unsigned H     = CLKS_PER_HALF;
  localparam int unsigned HCW   = $clog2(2 * H);
  localparam int unsigned BCW   = $clog2(NBITS + 1);

  logic [1:0]         sync;
  logic               prev;
  logic               active;
  logic [HCW-1:0]     hc;
  logic [BCW-1:0]     bits;
  logic               first;
  logic               err;
  logic [FRAME_W-2:0] data;    // all frame bits but the last

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync        <= '0;
      prev        <= 1'b0;
      active      <= 1'b0;
      hc          <= '0;
      bits        <= '0;
      first       <= 1'b0;
      err         <= 1'b0;
      data        <= '0;
      frame_valid <= 1'b0;
      header      <= '0;
      payload     <= '0;
      code_err    <= 1'b0;
    end else begin
      sync        <= {sync[0], rx};
      prev        <= sync[1];
      frame_valid <= 1'b0;
      if (!active) begin
        if (sync[1] && !prev) begin            // start of the start bit
          active <= 1'b1;
          hc     <= HCW'(1);
          bits   <= '0;
          err    <= 1'b0;
        end
      end else begin
        hc <= (hc == HCW'(2 * H - 1)) ? '0 : hc + 1'b1;
        if (hc == HCW'(H / 2)) first <= sync[1];
        if (hc == HCW'(H + H / 2)) begin
          if (first == sync[1]) err <= 1'b1;
          if (bits == '0) begin
            if (!first) err <= 1'b1;           // start bit must be '0'
          end else begin
            data <= {data[FRAME_W-3:0], sync[1]};
          end
          if (bits == BCW'(NBITS - 1)) begin
            active      <= 1'b0;
            frame_valid <= 1'b1;
            header      <= data[FRAME_W-2 -: 8];
            payload     <= {data[FRAME_W-10:0], sync[1]};
            code_err    <= err || (first == sync[1]);
          end
          bits <= bits + 1'b1;
        end
      end
    end
  end
endmodule
