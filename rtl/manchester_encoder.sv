// manchester_encoder: serial Manchester transmitter for the optical direct link.
//
// Sends one frame per send pulse (taken while busy is low): a start bit '0',
// then FRAME_W = 40 bits MSB first, made of an 8-bit header and a 32-bit
// payload. Each bit lasts 2*CLKS_PER_HALF clocks; the IEEE 802.3 convention is
// used ('0' = high then low, '1' = low then high). The line idles low, and after
// each frame it is held low for one more bit period so that the receiver sees a
// clean rising edge at the next start bit. busy is high from the clock after
// send until the idle gap is over. Manchester coding of 40-bit frames follows
// the CEL; frame layout, start bit, line code polarity and rate are this
// design's choices.
module manchester_encoder #(
  parameter int unsigned CLKS_PER_HALF = 4,
  parameter int unsigned FRAME_W       = 40
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 send,
  input  logic [7:0]           header,
  input  logic [FRAME_W-9:0]   payload,
  output logic                 busy,
  output logic                 tx
);
  localparam int unsigned NBITS = FRAME_W + 1;               // start bit + frame
  localparam int unsigned HCW   = $clog2(2 * CLKS_PER_HALF);
  localparam int unsigned BCW   = $clog2(NBITS + 2);

  logic [NBITS-1:0] sh;
  logic [HCW-1:0]   hc;      // clock within the bit
  logic [BCW-1:0]   bits;    // bit periods sent, including the idle gap

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      sh   <= '0;
      hc   <= '0;
      bits <= '0;
      tx   <= 1'b0;
    end else if (!busy) begin
      tx <= 1'b0;
      if (send) begin
        busy <= 1'b1;
        sh   <= {1'b0, header, payload};
        hc   <= '0;
        bits <= '0;
      end
    end else begin
      if (bits < BCW'(NBITS))
        tx <= (hc < HCW'(CLKS_PER_HALF)) ? ~sh[NBITS-1] : sh[NBITS-1];
      else
        tx <= 1'b0;                                  // idle gap
      if (hc == HCW'(2 * CLKS_PER_HALF - 1)) begin
        hc   <= '0;
        sh   <= sh << 1;
        bits <= bits + 1'b1;
        if (bits == BCW'(NBITS)) busy <= 1'b0;
      end else hc <= hc + 1'b1;
    end
  end
endmodule
