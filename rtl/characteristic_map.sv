// characteristic_map: 3D characteristic map with interpolated read-out.
//
// Returns z(x, y) from a map of NX x NY floating-point nodes on ascending,
// not necessarily equidistant axes. The map RAM (cm_ram) is written through the
// cfg port. A load pulse makes the control unit (cm_control) copy both axes
// into their own fast RAMs (cm_axis_ram), so that the two bisection searches
// (cm_axis_search) can run at the same time, each in log2(nodes) clocks. The
// control unit then reads the four nodes around the found cell and the
// interpolation module (cm_interp) computes z, by nearest node (method 0) or
// bilinearly (method 1). start is accepted while ready; done pulses with z.
// With NX = NY = 32, start to done takes 5 + 7 + 7 = 19 clocks (nearest) or
// 5 + 7 + 16 = 28 clocks (bilinear), whatever the point.
// Structure follows the CEL's map subsystem; sizes are this design's choice.
module characteristic_map
  import cel_pkg::*;
#(
  parameter int unsigned NX = 32,
  parameter int unsigned NY = 32,
  parameter int unsigned AW = $clog2(NX + NY + NX * NY)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [AW-1:0] cfg_addr,
  input  f32_t          cfg_wdata,
  input  logic          load,
  input  logic          method,
  input  logic          start,
  input  f32_t          x,
  input  f32_t          y,
  output logic          ready,
  output logic          done,
  output f32_t          z
);
  localparam int unsigned XAW = $clog2(NX);
  localparam int unsigned YAW = $clog2(NY);

  logic [AW-1:0]  ram_raddr;
  f32_t           ram_rdata;
  logic           xr_we, yr_we;
  logic [XAW-1:0] xr_waddr, xr_addr_lo, xr_addr_hi, xs_raddr, xs_index;
  logic [YAW-1:0] yr_waddr, yr_addr_lo, yr_addr_hi, ys_raddr, ys_index;
  f32_t           xr_wdata, yr_wdata, xr_lo, xr_hi, yr_lo, yr_hi, xs_rdata, ys_rdata;
  logic           srch_start, xs_done, ys_done, xs_busy, ys_busy;
  f32_t           srch_x, srch_y;
  logic           ip_start, ip_done, ip_busy;
  f32_t           ip_x, ip_x0, ip_x1, ip_y, ip_y0, ip_y1;
  f32_t           ip_z00, ip_z10, ip_z01, ip_z11, ip_z;

  cm_ram #(.DEPTH(NX + NY + NX * NY), .AW(AW)) u_ram (
    .clk, .we(cfg_we), .waddr(cfg_addr), .wdata(cfg_wdata),
    .raddr(ram_raddr), .rdata(ram_rdata)
  );

  cm_axis_ram #(.N(NX)) u_xram (
    .clk, .we(xr_we), .waddr(xr_waddr), .wdata(xr_wdata),
    .raddr_a(xs_raddr), .rdata_a(xs_rdata),
    .raddr_b(xr_addr_lo), .rdata_b(xr_lo),
    .raddr_c(xr_addr_hi), .rdata_c(xr_hi)
  );

  cm_axis_ram #(.N(NY)) u_yram (
    .clk, .we(yr_we), .waddr(yr_waddr), .wdata(yr_wdata),
    .raddr_a(ys_raddr), .rdata_a(ys_rdata),
    .raddr_b(yr_addr_lo), .rdata_b(yr_lo),
    .raddr_c(yr_addr_hi), .rdata_c(yr_hi)
  );

  cm_axis_search #(.N(NX)) u_xsearch (
    .clk, .rst_n, .start(srch_start), .value(srch_x),
    .raddr(xs_raddr), .rdata(xs_rdata), .busy(xs_busy), .done(xs_done), .index(xs_index)
  );

  cm_axis_search #(.N(NY)) u_ysearch (
    .clk, .rst_n, .start(srch_start), .value(srch_y),
    .raddr(ys_raddr), .rdata(ys_rdata), .busy(ys_busy), .done(ys_done), .index(ys_index)
  );

  cm_interp u_interp (
    .clk, .rst_n, .start(ip_start), .method,
    .x(ip_x), .x0(ip_x0), .x1(ip_x1), .y(ip_y), .y0(ip_y0), .y1(ip_y1),
    .z00(ip_z00), .z10(ip_z10), .z01(ip_z01), .z11(ip_z11),
    .busy(ip_busy), .done(ip_done), .z(ip_z)
  );

  cm_control #(.NX(NX), .NY(NY), .AW(AW)) u_ctrl (
    .clk, .rst_n, .load, .start, .x, .y, .ready, .done, .z,
    .ram_raddr, .ram_rdata,
    .xr_we, .xr_waddr, .xr_wdata, .xr_addr_lo, .xr_lo, .xr_addr_hi, .xr_hi,
    .yr_we, .yr_waddr, .yr_wdata, .yr_addr_lo, .yr_lo, .yr_addr_hi, .yr_hi,
    .srch_start, .srch_x, .srch_y,
    .xs_done, .xs_index, .ys_done, .ys_index,
    .ip_start, .ip_x, .ip_x0, .ip_x1, .ip_y, .ip_y0, .ip_y1,
    .ip_z00, .ip_z10, .ip_z01, .ip_z11, .ip_done, .ip_z
  );
endmodule
