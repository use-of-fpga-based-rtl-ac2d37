// tb_cm_control: self-checking test of cm_control, the map's control unit.
// The map RAM and both axis RAMs are models here, so the test sees exactly what
// the control unit does with them: the load must copy the 16 x-nodes and 8
// y-nodes (a 16 x 8 map) into the right axis-RAM words, and each lookup must
// read the four z nodes of the found cell and return the interpolated value
// (real cm_axis_search and cm_interp units are used). Latency is checked:
// 4 + 7 + 16 clocks bilinear for this map size.
module tb_cm_control;
  import tb_f32_pkg::*;
  localparam int NX = 16, NY = 8;
  localparam int AW = $clog2(NX + NY + NX * NY);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          load, start, ready, done;
  logic [31:0]   x, y, z;
  logic [AW-1:0] ram_raddr;
  logic [31:0]   ram_rdata;
  logic          xr_we, yr_we;
  logic [3:0]    xr_waddr, xr_addr_lo, xr_addr_hi, xs_raddr, xs_index;
  logic [2:0]    yr_waddr, yr_addr_lo, yr_addr_hi, ys_raddr, ys_index;
  logic [31:0]   xr_wdata, yr_wdata;
  logic          srch_start, xs_done, ys_done, xs_busy, ys_busy;
  logic [31:0]   srch_x, srch_y;
  logic          ip_start, ip_done, ip_busy;
  logic [31:0]   ip_x, ip_x0, ip_x1, ip_y, ip_y0, ip_y1, ip_z00, ip_z10, ip_z01, ip_z11, ip_z;

  logic [31:0] mem [NX + NY + NX * NY];
  logic [31:0] xmem [NX];
  logic [31:0] ymem [NY];
  real         xn [NX], yn [NY], zn [NX][NY];

  always_ff @(posedge clk) begin
    ram_rdata <= mem[ram_raddr];
    if (xr_we) xmem[xr_waddr] <= xr_wdata;
    if (yr_we) ymem[yr_waddr] <= yr_wdata;
  end

  cm_control #(.NX(NX), .NY(NY)) dut (
    .clk, .rst_n, .load, .start, .x, .y, .ready, .done, .z,
    .ram_raddr, .ram_rdata,
    .xr_we, .xr_waddr, .xr_wdata, .xr_addr_lo, .xr_lo(xmem[xr_addr_lo]), .xr_addr_hi, .xr_hi(xmem[xr_addr_hi]),
    .yr_we, .yr_waddr, .yr_wdata, .yr_addr_lo, .yr_lo(ymem[yr_addr_lo]), .yr_addr_hi, .yr_hi(ymem[yr_addr_hi]),
    .srch_start, .srch_x, .srch_y, .xs_done, .xs_index, .ys_done, .ys_index,
    .ip_start, .ip_x, .ip_x0, .ip_x1, .ip_y, .ip_y0, .ip_y1,
    .ip_z00, .ip_z10, .ip_z01, .ip_z11, .ip_done, .ip_z
  );

  cm_axis_search #(.N(NX)) u_xs (.clk, .rst_n, .start(srch_start), .value(srch_x),
    .raddr(xs_raddr), .rdata(xmem[xs_raddr]), .busy(xs_busy), .done(xs_done), .index(xs_index));
  cm_axis_search #(.N(NY)) u_ys (.clk, .rst_n, .start(srch_start), .value(srch_y),
    .raddr(ys_raddr), .rdata(ymem[ys_raddr]), .busy(ys_busy), .done(ys_done), .index(ys_index));
  cm_interp u_ip (.clk, .rst_n, .start(ip_start), .method(1'b1),
    .x(ip_x), .x0(ip_x0), .x1(ip_x1), .y(ip_y), .y0(ip_y0), .y1(ip_y1),
    .z00(ip_z00), .z10(ip_z10), .z01(ip_z01), .z11(ip_z11), .busy(ip_busy), .done(ip_done), .z(ip_z));

  function automatic real clamp01(input real v);
    return (v < 0.0) ? 0.0 : (v > 1.0) ? 1.0 : v;
  endfunction

  task automatic lookup(input real fx, input real fy);
    int  ix, iy, lat;
    real rx, ry, tx, ty, e, zr;
    rx = f2r(r2f(fx)); ry = f2r(r2f(fy));
    ix = 0; iy = 0;
    for (int i = 0; i < NX - 1; i++) if (xn[i] <= rx) ix = i;
    for (int j = 0; j < NY - 1; j++) if (yn[j] <= ry) iy = j;
    tx = clamp01((rx - xn[ix]) / (xn[ix+1] - xn[ix]));
    ty = clamp01((ry - yn[iy]) / (yn[iy+1] - yn[iy]));
    e = (1.0 - ty) * ((1.0 - tx) * zn[ix][iy] + tx * zn[ix+1][iy])
      + ty * ((1.0 - tx) * zn[ix][iy+1] + tx * zn[ix+1][iy+1]);
    @(negedge clk); start = 1'b1; x = r2f(fx); y = r2f(fy);
    @(negedge clk); start = 1'b0;
    lat = 1;
    while (!done && lat < 200) begin @(negedge clk); lat++; end
    zr = f2r(z);
    checks += 2;
    if (lat != 4 + 7 + 16) begin failures++; $display("FAIL latency %0d", lat); end
    if (zr - e > 1.0e-4 || e - zr > 1.0e-4) begin
      failures++; $display("FAIL (%f, %f): got %f expected %f", fx, fy, zr, e);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; start = 0; x = 0; y = 0;
    for (int i = 0; i < NX; i++) begin
      xn[i] = f2r(r2f(100.0 + 7.0 * real'(i) + 0.5 * real'(i * i)));
      mem[i] = r2f(xn[i]);
    end
    for (int j = 0; j < NY; j++) begin
      yn[j] = f2r(r2f(-5.0 + 1.5 * real'(j)));
      mem[NX + j] = r2f(yn[j]);
    end
    for (int j = 0; j < NY; j++)
      for (int i = 0; i < NX; i++) begin
        zn[i][j] = f2r(r2f(real'(i) + 100.0 * real'(j)));   // distinct per node
        mem[NX + NY + j * NX + i] = r2f(zn[i][j]);
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (ready) begin failures++; $display("FAIL ready before load"); end
    load = 1'b1;
    @(negedge clk); load = 1'b0;
    while (!ready) @(negedge clk);
    for (int i = 0; i < NX; i++) begin
      checks++;
      if (xmem[i] !== mem[i]) begin failures++; $display("FAIL x node %0d not copied", i); end
    end
    for (int j = 0; j < NY; j++) begin
      checks++;
      if (ymem[j] !== mem[NX + j]) begin failures++; $display("FAIL y node %0d not copied", j); end
    end
    for (int i = 0; i < NX; i++)
      for (int j = 0; j < NY; j++)
        lookup(xn[i] + 1.0, yn[j] + 0.25);
    for (int i = 0; i < 400; i++)
      lookup(90.0 + 230.0 * $urandom_range(10000) / 10000.0, -6.0 + 18.0 * $urandom_range(10000) / 10000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
