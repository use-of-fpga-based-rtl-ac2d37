// cm_axis_ram: fast on-chip copy of the nodes of one map axis.
//
// N 32-bit words, one synchronous write port and three asynchronous read ports:
// port a serves the bisection search (one probe per clock), ports b and c give
// the two ends of the found interval to the interpolation. The dedicated fast
// RAM per axis follows the CEL; the asynchronous three-port organisation is
// this design's choice, made so that a search step takes a single clock.
module cm_axis_ram #(
  parameter int unsigned N  = 32,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] raddr_a,
  output logic [31:0]   rdata_a,
  input  logic [AW-1:0] raddr_b,
  output logic [31:0]   rdata_b,
  input  logic [AW-1:0] raddr_c,
  output logic [31:0]   rdata_c
);
  logic [31:0] mem [N];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
  assign rdata_c = mem[raddr_c];
endmodule
