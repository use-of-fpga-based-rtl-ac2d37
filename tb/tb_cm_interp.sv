// tb_cm_interp: self-checking test of cm_interp.
// Random cells (x0 < x1, y0 < y1, random node values) and points inside and
// outside the cell. Bilinear results are compared with the same formula
// evaluated in double precision (tolerance 1e-5 relative to the node scale);
// nearest-node results must equal the node picked by the fractions computed here.
// The constant latencies (7 clocks nearest, 16 bilinear) are checked.
module tb_cm_interp;
  import tb_f32_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        start, method, busy, done;
  logic [31:0] x, x0, x1, y, y0, y1, z00, z10, z01, z11, z;

  cm_interp dut (.clk, .rst_n, .start, .method, .x, .x0, .x1, .y, .y0, .y1,
                 .z00, .z10, .z01, .z11, .busy, .done, .z);

  function automatic real clamp01(input real v);
    return (v < 0.0) ? 0.0 : (v > 1.0) ? 1.0 : v;
  endfunction

  task automatic run(input logic m, input real rx, input real rx0, input real rx1,
                     input real ry, input real ry0, input real ry1,
                     input real a00, input real a10, input real a01, input real a11);
    real tx, ty, e, scale, zr;
    int  lat;
    x = r2f(rx); x0 = r2f(rx0); x1 = r2f(rx1);
    y = r2f(ry); y0 = r2f(ry0); y1 = r2f(ry1);
    z00 = r2f(a00); z10 = r2f(a10); z01 = r2f(a01); z11 = r2f(a11);
    tx = clamp01((f2r(x) - f2r(x0)) / (f2r(x1) - f2r(x0)));
    ty = clamp01((f2r(y) - f2r(y0)) / (f2r(y1) - f2r(y0)));
    if (m) begin
      e = (1.0 - ty) * (f2r(z00) + tx * (f2r(z10) - f2r(z00)))
        + ty * (f2r(z01) + tx * (f2r(z11) - f2r(z01)));
    end else begin
      // keep away from the decision boundary
      if (tx > 0.4999 && tx < 0.5001) return;
      if (ty > 0.4999 && ty < 0.5001) return;
      e = (tx >= 0.5) ? ((ty >= 0.5) ? f2r(z11) : f2r(z10))
                      : ((ty >= 0.5) ? f2r(z01) : f2r(z00));
    end
    @(negedge clk); start = 1'b1; method = m;
    @(negedge clk); start = 1'b0;
    lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    checks += 2;
    if (lat != (m ? 16 : 7)) begin failures++; $display("FAIL latency %0d method %0d", lat, m); end
    scale = (a00 < 0 ? -a00 : a00) + (a10 < 0 ? -a10 : a10) + (a01 < 0 ? -a01 : a01) + (a11 < 0 ? -a11 : a11);
    zr = f2r(z);
    if ((zr - e > 1.0e-5 * scale) || (e - zr > 1.0e-5 * scale) || (!m && zr != e)) begin
      failures++;
      $display("FAIL method %0d: got %f expected %f (tx %f ty %f)", m, zr, e, tx, ty);
    end
  endtask

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * $urandom_range(1000000) / 1000000.0;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ax0, ax1, ay0, ay1;
    start = 0; method = 0;
    {x, x0, x1, y, y0, y1, z00, z10, z01, z11} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // corners and centre of a unit cell
    run(1'b1, 0.0, 0.0, 1.0, 0.0, 0.0, 1.0, 1.0, 2.0, 3.0, 4.0);
    run(1'b1, 1.0, 0.0, 1.0, 1.0, 0.0, 1.0, 1.0, 2.0, 3.0, 4.0);
    run(1'b1, 0.5, 0.0, 1.0, 0.5, 0.0, 1.0, 1.0, 2.0, 3.0, 4.0);
    run(1'b0, 0.7, 0.0, 1.0, 0.2, 0.0, 1.0, 1.0, 2.0, 3.0, 4.0);
    for (int i = 0; i < 3000; i++) begin
      ax0 = rnd(0.0, 2.0e8); ax1 = ax0 + rnd(1.0e3, 1.0e7);
      ay0 = rnd(-10.0, 9.0); ay1 = ay0 + rnd(0.05, 1.0);
      run(1'($urandom), rnd(ax0 - 1.0e5, ax1 + 1.0e5), ax0, ax1,
          rnd(ay0 - 0.1, ay1 + 0.1), ay0, ay1,
          rnd(0.9, 1.1), rnd(0.9, 1.1), rnd(-0.2, 0.2), rnd(0.5, 1.5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
