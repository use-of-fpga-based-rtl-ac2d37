// cm_axis_search: bisection search of the node interval on one map axis.
//
// Given an ascending list of N floating-point nodes (N a power of two) in an
// axis RAM, finds the index i with node[i] <= value < node[i+1], clamped to
// 0..N-2 (a value below the first node gives 0, one at or above the last gives
// N-2). Bisection builds i bit by bit from the MSB: probe = i | 2^b, keep the
// probe if node[probe] <= value. One probe per clock, the first in the clock of
// start, so done pulses exactly log2(N) clocks after start, independent of the
// value, as the CEL requires for real-time operation. The comparison is a
// floating-point "<=" done on the bit patterns. Bisection and the log2(N)
// latency follow the CEL; the clamping is this design's choice.
module cm_axis_search
  import cel_pkg::*;
#(
  parameter int unsigned N  = 32,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  f32_t          value,
  output logic [AW-1:0] raddr,
  input  f32_t          rdata,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] index
);
  f32_t                   val;
  logic [AW-1:0]          idx, idx_next, probe;
  logic [$clog2(AW+1)-1:0] b;
  f32_t                   cur;
  logic                   step;

  always_comb begin
    step     = busy || start;
    probe    = busy ? (idx | (AW'(1) << b)) : (AW'(1) << (AW - 1));
    cur      = busy ? val : value;
    raddr    = probe;
    idx_next = f32_le(rdata, cur) ? probe : (busy ? idx : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      idx   <= '0;
      b     <= '0;
      val   <= F32_ZERO;
      index <= '0;
    end else begin
      done <= 1'b0;
      if (step) begin
        if (!busy) val <= value;
        idx <= idx_next;
        if ((busy && b == '0) || (!busy && AW == 1)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          index <= (idx_next == AW'(N - 1)) ? AW'(N - 2) : idx_next;
        end else begin
          busy <= 1'b1;
          b    <= busy ? b - 1'b1 : $clog2(AW+1)'(AW - 2);
        end
      end
    end
  end
endmodule
