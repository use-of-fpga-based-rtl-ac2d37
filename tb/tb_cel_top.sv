// tb_cel_top: end-to-end test of the calibration electronic at its default
// sizes (R = 400, 32 x 32 map, 100 MHz clock assumed).
//
// Models around the FPGA: an ADC with gain error 1.03 and offset +50 mV, a DAC
// with gain error 0.97 and offset -30 mV, and the analogue selector feeding the
// ADC with the input voltage, ground, a 5 V reference or the DAC output. The
// optical input is driven with Manchester frames carrying frequency words
// (LSB = 200 MHz / 2^32); the optical output (signed, 10 V = 2^31) is decoded
// here.
//
// Scenario: power-up calibration; map written and loaded; frequency and input
// voltage applied; the corrected value is checked against the map interpolated
// here (multiply and add correction, bilinear and nearest-node lookup, two
// operating points); the DAC output voltage and the transmitted optical word
// must match the corrected value; a corrupted optical frame must be flagged and
// ignored; an online calibration after converter drift must restore accuracy.
// The output rate (one value per 400 clocks) and the propagation delay from an
// input step to half height at the DAC output (< 60 us) are measured.
// Each mechanism is counted and must occur at least once.
module tb_cel_top;
  import tb_f32_pkg::*;
  import cel_pkg::*;

  localparam int NX = 32, NY = 32, H = 4;
  localparam int AW = $clog2(NX + NY + NX * NY);
  localparam real VREF = 5.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [13:0]   adc_data, dac_data;
  cal_sel_e      cal_sel;
  logic          opt_rx, opt_tx, cfg_we, cm_load, fpu_mode, interp_method, online_cal_req;
  logic [AW-1:0] cfg_addr;
  logic [31:0]   cfg_wdata, out_value;
  logic          cal_busy, cm_ready, rx_err, out_valid;

  cel_top dut (.clk, .rst_n, .adc_data, .dac_data, .cal_sel, .opt_rx, .opt_tx,
               .cfg_we, .cfg_addr, .cfg_wdata, .cm_load, .fpu_mode, .interp_method,
               .online_cal_req, .cal_busy, .cm_ready, .rx_err, .out_valid, .out_value);

  // ---------------- converter and selector models ----------------
  real ga = 1.03, oa = 0.05, gd = 0.97, od = -0.03;
  real vin = 0.0;

  function automatic real dac_volts(input logic [13:0] c);
    return gd * real'($signed(c)) * 10.0 / 8192.0 + od;
  endfunction

  always @(posedge clk) begin
    real v, c;
    case (cal_sel)
      SEL_GROUND: v = 0.0;
      SEL_REF:    v = VREF;
      SEL_DAC:    v = dac_volts(dac_data);
      default:    v = vin;
    endcase
    c = $floor((ga * v + oa) * 8192.0 / 10.0 + 0.5);
    if (c > 8191.0) c = 8191.0;
    if (c < -8192.0) c = -8192.0;
    adc_data <= 14'($rtoi(c));
  end

  // ---------------- mechanism counters ----------------
  int n_pwrup_cal, n_online_cal, n_loopback, n_load, n_mul, n_add, n_bilin, n_near;
  int n_rx, n_rx_err, n_tx, n_out;
  logic busy_q, ready_q;

  always @(posedge clk) if (rst_n) begin
    busy_q  <= cal_busy;
    ready_q <= cm_ready;
    if (busy_q && !cal_busy) begin
      if (n_pwrup_cal == 0) n_pwrup_cal++; else n_online_cal++;
    end
    if (out_valid) begin
      n_out++;
      if (fpu_mode) n_mul++; else n_add++;
      if (interp_method) n_bilin++; else n_near++;
    end
  end
  logic lb_seen;
  always @(posedge clk) if (rst_n) begin
    if (cm_load) n_load++;
    if (cal_sel == SEL_DAC && !lb_seen) begin n_loopback++; lb_seen <= 1'b1; end
    if (cal_sel != SEL_DAC) lb_seen <= 1'b0;
  end

  // ---------------- optical input driver ----------------
  task automatic send_frame(input logic [39:0] f, input int bad);
    logic [40:0] bits;
    bits = {1'b0, f};
    repeat (3 * H) @(negedge clk);
    for (int k = 0; k < 41; k++) begin
      repeat (H) begin @(negedge clk); opt_rx = ~bits[40 - k]; end
      repeat (H) begin @(negedge clk); opt_rx = (k == bad) ? ~bits[40 - k] : bits[40 - k]; end
    end
    @(negedge clk); opt_rx = 1'b0;
    repeat (4 * H) @(negedge clk);
  endtask

  real freq = 0.0;
  task automatic send_freq(input real f_hz);
    logic [31:0] w;
    w = 32'(longint'($floor(f_hz * 4294967296.0 / 200.0e6 + 0.5)));
    freq = real'(longint'(w)) * 200.0e6 / 4294967296.0;
    send_frame({8'h02, w}, -1);
    n_rx++;
    checks++;
    if (rx_err) begin failures++; $display("FAIL clean frame flagged"); end
  endtask

  // ---------------- optical output monitor ----------------
  logic [31:0] tx_word;
  logic [7:0]  tx_head;
  initial begin
    logic [40:0] sh;
    forever begin
      @(posedge clk);
      if (rst_n && opt_tx) begin
        // start of a start bit: sample mid first half and mid second half
        for (int k = 0; k < 41; k++) begin
          logic a, b;
          repeat ((k == 0) ? H / 2 : H) @(posedge clk);
          a = opt_tx;
          repeat (H) @(posedge clk);
          b = opt_tx;
          if (a == b) begin failures++; $display("FAIL tx code violation"); end
          sh = {sh[39:0], b};
        end
        checks++;
        {tx_head, tx_word} = sh[39:0];
        if (sh[40] || tx_head != 8'h01) begin failures++; $display("FAIL tx frame header %h", tx_head); end
        n_tx++;
        repeat (H) @(posedge clk);
      end
    end
  end

  // ---------------- map ----------------
  real xn [NX], yn [NY], zn [NX][NY];

  function automatic real clamp01(input real v);
    return (v < 0.0) ? 0.0 : (v > 1.0) ? 1.0 : v;
  endfunction

  function automatic real zref(input real rx, input real ry, input logic m);
    int  ix, iy;
    real tx, ty;
    ix = 0; iy = 0;
    for (int i = 0; i < NX - 1; i++) if (xn[i] <= rx) ix = i;
    for (int j = 0; j < NY - 1; j++) if (yn[j] <= ry) iy = j;
    tx = clamp01((rx - xn[ix]) / (xn[ix+1] - xn[ix]));
    ty = clamp01((ry - yn[iy]) / (yn[iy+1] - yn[iy]));
    if (!m) return zn[ix + (tx >= 0.5)][iy + (ty >= 0.5)];
    return (1.0 - ty) * ((1.0 - tx) * zn[ix][iy] + tx * zn[ix+1][iy])
         + ty * ((1.0 - tx) * zn[ix][iy+1] + tx * zn[ix+1][iy+1]);
  endfunction

  task automatic write_map();
    for (int i = 0; i < NX; i++) begin
      xn[i] = f2r(r2f(1.0e6 * (6.0 * real'(i) + 0.03 * real'(i * i))));
      @(negedge clk); cfg_we = 1'b1; cfg_addr = AW'(i); cfg_wdata = r2f(xn[i]);
    end
    for (int j = 0; j < NY; j++) begin
      yn[j] = f2r(r2f(-10.0 + 0.6 * real'(j) + 0.002 * real'(j * j)));
      @(negedge clk); cfg_we = 1'b1; cfg_addr = AW'(NX + j); cfg_wdata = r2f(yn[j]);
    end
    for (int j = 0; j < NY; j++)
      for (int i = 0; i < NX; i++) begin
        // gain-like correction, varying with frequency and amplitude, plus a ripple
        zn[i][j] = f2r(r2f(1.0 + 0.0015 * real'(i) - 0.0008 * real'(j) + 0.004 * real'((i + j) % 3)));
        @(negedge clk); cfg_we = 1'b1; cfg_addr = AW'(NX + NY + j * NX + i); cfg_wdata = r2f(zn[i][j]);
      end
    @(negedge clk); cfg_we = 1'b0;
    @(negedge clk); cm_load = 1'b1;
    @(negedge clk); cm_load = 1'b0;
  endtask

  // ---------------- checks of the corrected output ----------------
  task automatic wait_samples(input int n);
    int k;
    k = 0;
    while (k < n) begin @(posedge clk); if (out_valid) k++; end
  endtask

  task automatic check_point(input string tag);
    real z, e, o, vd, w;
    wait_samples(12);                       // CIC and calibration settle
    @(posedge clk iff out_valid);
    #1;
    z = zref(freq, vin, interp_method);
    e = fpu_mode ? vin * z : vin + z;
    o = f2r(out_value);
    checks++;
    if (o - e > 0.005 || e - o > 0.005) begin
      failures++; $display("FAIL %s: corrected %f expected %f", tag, o, e);
    end
    // DAC output and optical word follow the corrected value
    wait_samples(8);
    vd = dac_volts(dac_data);
    checks++;
    if (vd - o > 0.01 || o - vd > 0.01) begin
      failures++; $display("FAIL %s: DAC output %f V for %f V", tag, vd, o);
    end
    w = real'($signed(tx_word)) * 10.0 / 2147483648.0;
    checks++;
    if (w - o > 1.0e-6 || o - w > 1.0e-6) begin
      failures++; $display("FAIL %s: optical word %f for %f", tag, w, o);
    end
    $display("%s: f=%0.3f MHz vin=%0.4f V z=%0.5f out=%0.5f expected %0.5f dac=%0.4f V",
             tag, freq / 1.0e6, vin, z, o, e, vd);
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {n_pwrup_cal, n_online_cal, n_loopback, n_load, n_mul, n_add, n_bilin, n_near} = '0;
    {n_rx, n_rx_err, n_tx, n_out} = '0;
    busy_q = 0; ready_q = 0; lb_seen = 0;
    opt_rx = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; cm_load = 0;
    fpu_mode = 1; interp_method = 1; online_cal_req = 0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    write_map();
    send_freq(47.3e6);
    vin = 2.5;
    while (cal_busy) @(posedge clk);
    checks++;
    if (!cm_ready) begin failures++; $display("FAIL map not ready"); end
    check_point("mul/bilinear");
    fpu_mode = 0;
    check_point("add/bilinear");
    interp_method = 0;
    check_point("add/nearest");
    fpu_mode = 1;
    check_point("mul/nearest");
    interp_method = 1;
    send_freq(151.25e6);
    vin = -6.3;
    check_point("mul/bilinear 2");
    // corrupted frame: flagged, frequency unchanged
    send_frame({8'h02, 32'h0000_1234}, 17);
    checks++;
    if (!rx_err) begin failures++; $display("FAIL corrupted frame not flagged"); end
    else n_rx_err++;
    check_point("after bad frame");
    // converter drift, then online calibration
    ga = 0.96; oa = -0.08; gd = 1.02; od = 0.04;
    @(negedge clk); online_cal_req = 1'b1;
    @(negedge clk); online_cal_req = 1'b0;
    repeat (5) @(posedge clk);
    while (cal_busy) @(posedge clk);
    check_point("after online calibration");
    // rate: one corrected sample per 400 clocks (250 kHz)
    begin
      int n0;
      @(posedge clk iff out_valid);
      n0 = n_out;
      repeat (20 * 400) @(posedge clk);
      checks++;
      if (n_out - n0 < 19 || n_out - n0 > 21) begin
        failures++; $display("FAIL %0d outputs in 20 sample periods", n_out - n0);
      end
    end
    // propagation delay: input step to half-way at the DAC output, < 60 us = 6000 clocks
    begin
      real v_old, v_new, mid;
      int  clks;
      v_old = dac_volts(dac_data);
      v_new = 3.0 * zref(freq, 3.0, 1'b1);
      mid   = 0.5 * (v_old + v_new);
      @(negedge clk); vin = 3.0;
      clks = 0;
      while (dac_volts(dac_data) < mid && clks < 20000) begin @(posedge clk); clks++; end
      checks++;
      $display("propagation delay (half step at DAC output): %0d clocks = %0.2f us", clks, real'(clks) / 100.0);
      if (clks >= 6000) begin failures++; $display("FAIL propagation delay %0d clocks", clks); end
    end
    check_point("after step");
    // mechanism coverage
    $display("mechanisms: power-up cal %0d, online cal %0d, DAC loop-back %0d, map load %0d, mul %0d, add %0d, bilinear %0d, nearest %0d, rx %0d, rx error %0d, tx %0d",
             n_pwrup_cal, n_online_cal, n_loopback, n_load, n_mul, n_add, n_bilin, n_near, n_rx, n_rx_err, n_tx);
    begin
      int cov [11];
      cov = '{n_pwrup_cal, n_online_cal, n_loopback, n_load, n_mul, n_add, n_bilin, n_near, n_rx, n_rx_err, n_tx};
      foreach (cov[i]) begin
        checks++;
        if (cov[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
