// cm_ram: storage of the characteristic map (CM).
//
// Holds every floating-point node of the map: the NX x-axis nodes at addresses
// 0..NX-1, the NY y-axis nodes at NX..NX+NY-1 and the NX*NY z nodes at
// NX+NY+iy*NX+ix. One write port (map configuration) and one synchronous read
// port (rdata valid the clock after raddr) for the map's control unit. The map
// RAM follows the CEL, where it is a RAM on the converter board; here it is an
// on-chip array, and the address layout is this design's choice.
module cm_ram #(
  parameter int unsigned DEPTH = 32 + 32 + 32 * 32,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
