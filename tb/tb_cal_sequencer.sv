// tb_cal_sequencer: self-checking test of cal_sequencer.
// The converters are modelled here: the ADC reads ga*v + oa (+-1 code noise),
// where v is picked by the selector (signal, ground 0, reference 16384, or the
// DAC output gd*c + od for DAC code c); the calibrated ADC stream applies the
// sequencer's ADC constants. After the power-up calibration, and again after an
// online calibration request with changed converter errors, the test checks
// that calibrated ADC readings equal the true code within 3 codes and that a
// requested DAC code, pre-distorted with the DAC constants, is read back within
// 4 codes. It also checks the selector order (ground, reference, DAC loop-back),
// that the DAC is forced only during the loop-back steps, and busy/done.
module tb_cal_sequencer;
  import cel_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               cal_req, raw_valid, adc_valid, dac_force, busy, done;
  logic signed [15:0] raw_data, adc_data, dac_code, adc_gcc, adc_occ, dac_gcc, dac_occ;
  cal_sel_e           sel;

  real ga, oa, gd, od;
  int  ndone;
  cal_sel_e seen [$];

  cal_sequencer dut (.clk, .rst_n, .cal_req, .raw_valid, .raw_data, .adc_valid, .adc_data,
                     .sel, .dac_force, .dac_code, .adc_gcc, .adc_occ, .dac_gcc, .dac_occ,
                     .busy, .done);

  function automatic int sat16(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  function automatic int lcal(input int v, input int g, input int o);
    longint p;
    p = longint'(v) * g;
    return sat16(((p >= 0) ? p / 16384 : -((-p + 16383) / 16384)) + o);
  endfunction

  function automatic int adc_read(input real v, input int noise);
    return sat16(longint'($floor(ga * v + oa + 0.5)) + noise);
  endfunction

  function automatic real dac_out(input int c);
    return gd * real'(c) + od;
  endfunction

  // sample streams: one decimated sample every 4 clocks
  int phase;
  always @(posedge clk) begin
    real v;
    int  r;
    if (!rst_n) begin
      phase <= 0; raw_valid <= 1'b0; adc_valid <= 1'b0;
    end else begin
      phase <= (phase + 1) % 4;
      case (sel)
        SEL_GROUND: v = 0.0;
        SEL_REF:    v = 16384.0;
        SEL_DAC:    v = dac_out(int'(dac_code));
        default:    v = 3000.0;
      endcase
      r = adc_read(v, int'($urandom_range(2)) - 1);
      raw_valid <= (phase == 0);
      adc_valid <= (phase == 0);
      raw_data  <= 16'(r);
      adc_data  <= 16'(lcal(r, int'(adc_gcc), int'(adc_occ)));
      if (seen.size() == 0 || seen[$] != sel) seen.push_back(sel);
      if (done) ndone <= ndone + 1;
      if (dac_force && sel != SEL_DAC) begin failures++; $display("FAIL DAC forced outside loop-back"); end
    end
  end

  task automatic verify(input string tag);
    int   d;
    checks++;
    if (seen.size() < 4 || seen[$-3] != SEL_GROUND || seen[$-2] != SEL_REF ||
        seen[$-1] != SEL_DAC || seen[$] != SEL_SIGNAL) begin
      failures++; $display("FAIL %s: selector order", tag);
    end
    for (int v = -30000; v <= 30000; v += 2500) begin
      checks++;
      d = lcal(adc_read(real'(v), 0), int'(adc_gcc), int'(adc_occ)) - v;
      if (d > 3 || d < -3) begin failures++; $display("FAIL %s: ADC code %0d off by %0d", tag, v, d); end
    end
    for (int r = -28000; r <= 28000; r += 4000) begin
      int c;
      checks++;
      c = lcal(r, int'(dac_gcc), int'(dac_occ));
      d = lcal(adc_read(dac_out(c), 0), int'(adc_gcc), int'(adc_occ)) - r;
      if (d > 4 || d < -4) begin failures++; $display("FAIL %s: DAC code %0d read back off by %0d", tag, r, d); end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ga = 1.05; oa = -120.0; gd = 0.95; od = 80.0;
    cal_req = 0; ndone = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    checks++;
    if (!busy) begin failures++; $display("FAIL power-up calibration did not start"); end
    while (busy) @(posedge clk);
    repeat (4) @(posedge clk);
    checks++;
    if (ndone != 1) begin failures++; $display("FAIL done pulses %0d", ndone); end
    verify("power-up");
    // drift, then online calibration
    ga = 0.97; oa = 200.0; gd = 1.04; od = -150.0;
    repeat (20) @(posedge clk);
    checks++;
    if (busy || sel != SEL_SIGNAL) begin failures++; $display("FAIL not idle"); end
    @(negedge clk); cal_req = 1'b1;
    @(negedge clk); cal_req = 1'b0;
    while (busy) @(posedge clk);
    repeat (4) @(posedge clk);
    checks++;
    if (ndone != 2) begin failures++; $display("FAIL done pulses %0d", ndone); end
    verify("online");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
