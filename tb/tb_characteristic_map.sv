// tb_characteristic_map: self-checking test of the characteristic map.
// A 32 x 32 map with non-equidistant axes (frequency 0..~216 MHz, voltage
// -10..+10.5 V) and random node values is written through the configuration
// port and loaded. Random points inside and outside the map are looked up with
// both methods. The reference finds the cell by linear scan and interpolates in
// double precision (bilinear, tolerance 1e-5) or picks the nearest node. The
// lookup time must be constant: 5 (search) + 7 + 16 = 28 clocks bilinear and
// 5 + 7 + 7 = 19 clocks nearest.
module tb_characteristic_map;
  import tb_f32_pkg::*;
  localparam int NX = 32, NY = 32;
  localparam int AW = $clog2(NX + NY + NX * NY);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          cfg_we, load, method, start, ready, done;
  logic [AW-1:0] cfg_addr;
  logic [31:0]   cfg_wdata, x, y, z;
  real           xn [NX], yn [NY], zn [NX][NY];

  characteristic_map dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .load, .method,
                          .start, .x, .y, .ready, .done, .z);

  task automatic wr(input int a, input real v);
    @(negedge clk); cfg_we = 1'b1; cfg_addr = AW'(a); cfg_wdata = r2f(v);
  endtask

  function automatic real clamp01(input real v);
    return (v < 0.0) ? 0.0 : (v > 1.0) ? 1.0 : v;
  endfunction

  task automatic lookup(input logic m, input real fx, input real fy);
    int  ix, iy, lat;
    real rx, ry, tx, ty, e, zr;
    rx = f2r(r2f(fx)); ry = f2r(r2f(fy));
    ix = 0; iy = 0;
    for (int i = 0; i < NX - 1; i++) if (xn[i] <= rx) ix = i;
    for (int j = 0; j < NY - 1; j++) if (yn[j] <= ry) iy = j;
    tx = clamp01((rx - xn[ix]) / (xn[ix+1] - xn[ix]));
    ty = clamp01((ry - yn[iy]) / (yn[iy+1] - yn[iy]));
    if (!m && ((tx > 0.4999 && tx < 0.5001) || (ty > 0.4999 && ty < 0.5001))) return;
    if (m)
      e = (1.0 - ty) * ((1.0 - tx) * zn[ix][iy] + tx * zn[ix+1][iy])
        + ty * ((1.0 - tx) * zn[ix][iy+1] + tx * zn[ix+1][iy+1]);
    else
      e = zn[ix + (tx >= 0.5)][iy + (ty >= 0.5)];
    @(negedge clk); start = 1'b1; method = m; x = r2f(fx); y = r2f(fy);
    @(negedge clk); start = 1'b0; x = 32'h0; y = 32'h0;
    lat = 1;
    while (!done && lat < 200) begin @(negedge clk); lat++; end
    zr = f2r(z);
    checks += 2;
    if (lat != (m ? 28 : 19)) begin failures++; $display("FAIL latency %0d (method %0d)", lat, m); end
    if (zr - e > 1.0e-5 || e - zr > 1.0e-5) begin
      failures++; $display("FAIL (%f, %f) method %0d: got %f expected %f", fx, fy, m, zr, e);
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; load = 0; method = 0; start = 0; x = 0; y = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NX; i++) begin
      xn[i] = f2r(r2f(1.0e6 * (real'(i) * 3.0 + 0.1 * real'(i * i))));
      wr(i, xn[i]);
    end
    for (int j = 0; j < NY; j++) begin
      yn[j] = f2r(r2f(-10.0 + 0.6 * real'(j) + 0.002 * real'(j * j)));
      wr(NX + j, yn[j]);
    end
    for (int j = 0; j < NY; j++)
      for (int i = 0; i < NX; i++) begin
        zn[i][j] = f2r(r2f(0.9 + 0.2 * $urandom_range(100000) / 100000.0));
        wr(NX + NY + j * NX + i, zn[i][j]);
      end
    @(negedge clk); cfg_we = 1'b0;
    checks++;
    if (ready) begin failures++; $display("FAIL ready before load"); end
    @(negedge clk); load = 1'b1;
    @(negedge clk); load = 1'b0;
    repeat (NX + NY + 4) @(negedge clk);
    checks++;
    if (!ready) begin failures++; $display("FAIL not ready after load"); end
    lookup(1'b1, 0.0, -10.0);
    lookup(1'b1, xn[NX-1], yn[NY-1]);
    lookup(1'b1, xn[5], yn[7]);
    lookup(1'b1, 250.0e6, 12.0);      // outside: clamped
    lookup(1'b1, -1.0e6, -11.0);
    for (int i = 0; i < 1500; i++)
      lookup(1'($urandom), 2.2e8 * $urandom_range(100000) / 100000.0,
             -10.5 + 21.0 * $urandom_range(100000) / 100000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
