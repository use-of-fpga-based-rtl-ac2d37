// tb_cel_bandwidth: frequency response of the whole analogue path of cel_top
// at its default sizes (100 MHz clock, R = 400, 3rd-order CIC filters).
//
// Ideal converters are modelled. The map holds z = 1 everywhere and the unit
// multiplies, so the FPGA should pass the input voltage through, apart from the
// filters. A 5 V sine at 5, 25, 50 and 100 kHz is applied after the power-up
// calibration. The DAC output is correlated with sine and cosine over whole
// periods, which gives its amplitude at the input frequency and ignores the
// images the interpolator leaves. The measured gain must match the response of
// the two CIC filters, (sin(pi f R / fs) / (R sin(pi f / fs)))^3 each, within
// 3 %. At 5 kHz the gain must be close to 1.
module tb_cel_bandwidth;
  import tb_f32_pkg::*;
  import cel_pkg::*;

  localparam int NX = 32, NY = 32;
  localparam int AW = $clog2(NX + NY + NX * NY);
  localparam real FS = 100.0e6;
  localparam real PI = 3.14159265358979;

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

  real    amp = 0.0, fsig = 0.0;
  longint t = 0;

  function automatic real dac_volts(input logic [13:0] c);
    return real'($signed(c)) * 10.0 / 8192.0;
  endfunction

  always @(posedge clk) begin
    real v, c;
    t <= t + 1;
    case (cal_sel)
      SEL_GROUND: v = 0.0;
      SEL_REF:    v = 5.0;
      SEL_DAC:    v = dac_volts(dac_data);
      default:    v = amp * $sin(2.0 * PI * fsig * real'(t) / FS);
    endcase
    c = $floor(v * 8192.0 / 10.0 + 0.5);
    if (c > 8191.0) c = 8191.0;
    if (c < -8192.0) c = -8192.0;
    adc_data <= 14'($rtoi(c));
  end

  function automatic real cic_gain(input real f);
    real u;
    u = PI * f * 400.0 / FS;
    return ($sin(u) / (400.0 * $sin(PI * f / FS))) ** 3;
  endfunction

  task automatic measure(input real f, output real g);
    longint n, per;
    real    si, co, e, ph;
    fsig = f;
    amp  = 5.0;
    per  = longint'(FS / f);
    repeat (6000) @(posedge clk);          // filters settle
    si = 0.0; co = 0.0;
    n  = (per >= 20000) ? per : per * longint'(40000 / per);
    for (longint k = 0; k < n; k++) begin
      @(posedge clk);
      ph = 2.0 * PI * f * real'(t) / FS;
      si += dac_volts(dac_data) * $sin(ph);
      co += dac_volts(dac_data) * $cos(ph);
    end
    g = 2.0 * $sqrt(si * si + co * co) / real'(n) / amp;
    e = cic_gain(f) ** 2;
    checks++;
    $display("f = %0.0f kHz: gain %0.4f, two-CIC model %0.4f", f / 1.0e3, g, e);
    if (g > e * 1.03 || g < e * 0.97) begin
      failures++; $display("FAIL gain at %0.0f kHz", f / 1.0e3);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opt_rx = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; cm_load = 0;
    fpu_mode = 1; interp_method = 1; online_cal_req = 0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    // flat map, z = 1
    for (int a = 0; a < NX + NY + NX * NY; a++) begin
      real v;
      if (a < NX)           v = 1.0e7 * real'(a);
      else if (a < NX + NY) v = -12.0 + 0.8 * real'(a - NX);
      else                  v = 1.0;
      @(negedge clk); cfg_we = 1'b1; cfg_addr = AW'(a); cfg_wdata = r2f(v);
    end
    @(negedge clk); cfg_we = 1'b0; cm_load = 1'b1;
    @(negedge clk); cm_load = 1'b0;
    while (cal_busy) @(posedge clk);
    begin
      real g;
      measure(5.0e3, g);
      checks++;
      if (g < 0.98 || g > 1.01) begin failures++; $display("FAIL pass-band gain %f", g); end
      measure(25.0e3, g);
      measure(50.0e3, g);
      measure(100.0e3, g);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
