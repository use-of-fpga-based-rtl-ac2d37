// cel_top: FPGA datapath of the calibration electronic (CEL) for rf cavities.
//
// The CEL corrects a set value on its way to an rf cavity for the known errors
// of the transmission path. Its correction depends on the operating frequency
// and on the amplitude, and is kept as a 3D characteristic map z(f, U).
//
// Analogue path: ADC (14 bit, one sample per clock) -> CIC decimator (R = 400,
// 100 MHz -> 250 kHz, 16 bit) -> ADC calibration GCC*x+OCC -> fixed-to-float ->
// scaling to volts. Optical path: Manchester decoder (40-bit frames) -> 32-bit
// frequency word -> fixed-to-float -> scaling to hertz (200 MHz / 2^32 per LSB);
// the latest frequency is held. Every voltage sample starts a map lookup at
// (x = frequency, y = voltage); the FPU then multiplies the voltage by z
// (fpu_mode = 1) or adds z to it (fpu_mode = 0). The corrected value (volts) is
// brought out as out_value and goes two ways: float-to-fixed (16 bit) -> DAC
// calibration -> CIC interpolator (back to 100 MHz, 14 bit) -> DAC, and
// float-to-fixed (signed 32 bit, +-10 V full scale) -> Manchester encoder ->
// optical output. The interpolator takes a new value at each
// decimator output strobe, so both ends run at exactly 250 kHz.
//
// Calibration: after reset and on online_cal_req the sequencer drives the
// analogue selector (cal_sel: signal, ground, reference, DAC loop-back), forces
// DAC test codes and computes the ADC and DAC constants.
//
// The map RAM is written through cfg_we/cfg_addr/cfg_wdata (standing for the
// JTAG configuration access); cm_load then copies the axes into the search RAMs.
// A sample arriving while the map is busy or not loaded is not corrected and
// produces no output. Latency from a decimated sample to out_valid is about 50
// clocks (0.5 us) with the default map size, far below one sample period.
// The chain of blocks follows the CEL block diagram; the sample-drop rule, the
// header byte of transmitted frames and the port-level configuration access are
// this design's choices.
module cel_top
  import cel_pkg::*;
#(
  parameter int unsigned R             = 400,
  parameter int unsigned NX            = 32,
  parameter int unsigned NY            = 32,
  parameter int unsigned CLKS_PER_HALF = 4,
  parameter int unsigned SETTLE        = 6,
  parameter int unsigned AVG_LOG2      = 2,
  parameter logic [7:0]  TX_HEADER     = 8'h01,
  parameter int unsigned AW            = $clog2(NX + NY + NX * NY)
) (
  input  logic          clk,
  input  logic          rst_n,
  // converters and analogue selector
  input  logic [13:0]   adc_data,
  output logic [13:0]   dac_data,
  output cal_sel_e      cal_sel,
  // optical direct links
  input  logic          opt_rx,
  output logic          opt_tx,
  // configuration and control
  input  logic          cfg_we,
  input  logic [AW-1:0] cfg_addr,
  input  logic [31:0]   cfg_wdata,
  input  logic          cm_load,
  input  logic          fpu_mode,
  input  logic          interp_method,
  input  logic          online_cal_req,
  // status and result
  output logic          cal_busy,
  output logic          cm_ready,
  output logic          rx_err,
  output logic          out_valid,
  output logic [31:0]   out_value
);
  localparam f32_t SCALE_V     = 32'h39A0_0000;  // 10 V / 32768 per code
  localparam f32_t SCALE_HZ    = 32'h3D3E_BC20;  // 200 MHz / 2^32 per LSB
  localparam f32_t SCALE_CODE  = 32'h454C_CCCD;  // 3276.8 codes per volt
  localparam f32_t SCALE_WORD  = 32'h4D4C_CCCD;  // 2^31 / 10 V

  // ---------------- analogue input path ----------------
  logic               raw_v, adcc_v, adcf_v, volt_v;
  logic signed [15:0] raw_d, adcc_d;
  f32_t               adcf_d, volt_d;
  logic signed [15:0] adc_gcc, adc_occ, dac_gcc, dac_occ;
  logic               dac_force, cal_done;
  logic signed [15:0] dac_code;

  cic_decimator #(.IN_W(14), .OUT_W(16), .R(R)) u_dec (
    .clk, .rst_n, .in_valid(1'b1), .in_data(adc_data),
    .out_valid(raw_v), .out_data(raw_d)
  );

  lin_cal #(.W(16)) u_adc_cal (
    .clk, .rst_n, .in_valid(raw_v), .in_data(raw_d), .gcc(adc_gcc), .occ(adc_occ),
    .out_valid(adcc_v), .out_data(adcc_d)
  );

  cal_sequencer #(.W(16), .SETTLE(SETTLE), .AVG_LOG2(AVG_LOG2)) u_seq (
    .clk, .rst_n, .cal_req(online_cal_req),
    .raw_valid(raw_v), .raw_data(raw_d), .adc_valid(adcc_v), .adc_data(adcc_d),
    .sel(cal_sel), .dac_force, .dac_code,
    .adc_gcc, .adc_occ, .dac_gcc, .dac_occ, .busy(cal_busy), .done(cal_done)
  );

  fix2float #(.W(16), .SIGNED(1'b1)) u_adc_f2f (
    .clk, .rst_n, .in_valid(adcc_v), .in_data(adcc_d),
    .out_valid(adcf_v), .out_data(adcf_d)
  );

  si_converter #(.SCALE(SCALE_V)) u_adc_si (
    .clk, .rst_n, .in_valid(adcf_v), .in_data(adcf_d),
    .out_valid(volt_v), .out_data(volt_d)
  );

  // ---------------- optical input path ----------------
  logic        rx_v, rxf_v, freq_v;
  logic [7:0]  rx_header;
  logic [31:0] rx_payload;
  f32_t        rxf_d, freq_d, freq_q;

  manchester_decoder #(.CLKS_PER_HALF(CLKS_PER_HALF)) u_rx (
    .clk, .rst_n, .rx(opt_rx), .frame_valid(rx_v), .header(rx_header),
    .payload(rx_payload), .code_err(rx_err)
  );

  fix2float #(.W(32), .SIGNED(1'b0)) u_opt_f2f (
    .clk, .rst_n, .in_valid(rx_v && !rx_err), .in_data(rx_payload),
    .out_valid(rxf_v), .out_data(rxf_d)
  );

  si_converter #(.SCALE(SCALE_HZ)) u_opt_si (
    .clk, .rst_n, .in_valid(rxf_v), .in_data(rxf_d),
    .out_valid(freq_v), .out_data(freq_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      freq_q <= F32_ZERO;
    else if (freq_v) freq_q <= freq_d;
  end

  // ---------------- characteristic map and FPU ----------------
  logic cm_start, cm_done;
  f32_t cm_z, volt_q;

  assign cm_start = volt_v && cm_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        volt_q <= F32_ZERO;
    else if (cm_start) volt_q <= volt_d;
  end

  characteristic_map #(.NX(NX), .NY(NY), .AW(AW)) u_cm (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .load(cm_load),
    .method(interp_method), .start(cm_start), .x(freq_q), .y(volt_d),
    .ready(cm_ready), .done(cm_done), .z(cm_z)
  );

  cel_fpu u_fpu (
    .clk, .rst_n, .mode(fpu_mode), .in_valid(cm_done), .a(volt_q), .z(cm_z),
    .out_valid, .out_data(out_value)
  );

  // ---------------- analogue output path ----------------
  logic               dreq_v, dcal_v;
  logic signed [15:0] dreq_d, dcal_d, dac_hold;

  float2fix #(.W(16), .SIGNED(1'b1), .SCALE(SCALE_CODE)) u_dac_f2f (
    .clk, .rst_n, .in_valid(out_valid), .in_data(out_value),
    .out_valid(dreq_v), .out_data(dreq_d)
  );

  lin_cal #(.W(16)) u_dac_cal (
    .clk, .rst_n, .in_valid(dreq_v), .in_data(dreq_d), .gcc(dac_gcc), .occ(dac_occ),
    .out_valid(dcal_v), .out_data(dcal_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      dac_hold <= '0;
    else if (dcal_v) dac_hold <= dcal_d;
  end

  cic_interpolator #(.IN_W(16), .OUT_W(14), .R(R)) u_int (
    .clk, .rst_n, .in_valid(raw_v), .in_data(dac_force ? dac_code : dac_hold),
    .out_data(dac_data)
  );

  // ---------------- optical output path ----------------
  logic        word_v, tx_busy;
  logic [31:0] word_d;

  float2fix #(.W(32), .SIGNED(1'b1), .SCALE(SCALE_WORD)) u_opt_f2x (
    .clk, .rst_n, .in_valid(out_valid), .in_data(out_value),
    .out_valid(word_v), .out_data(word_d)
  );

  manchester_encoder #(.CLKS_PER_HALF(CLKS_PER_HALF)) u_tx (
    .clk, .rst_n, .send(word_v), .header(TX_HEADER), .payload(word_d),
    .busy(tx_busy), .tx(opt_tx)
  );
endmodule
