// cal_sequencer: sequence control of the power-up and online converter calibration.
//
// Determines the gain and offset calibration constants (GCC, OCC) of the ADC and
// the DAC path by switching known signals to the ADC input with the analog
// selector ("monolithic switch"):
//   1. ground           -> mean of the uncalibrated ADC stream, target code 0
//   2. voltage reference -> mean of the uncalibrated ADC stream, target REF_CODE
//      ADC constants: GCC = (REF_CODE - 0) / (m_ref - m_gnd), OCC = 0 - GCC*m_gnd
//   3. DAC loop-back, DAC forced to DAC_LO -> mean of the calibrated ADC stream
//   4. DAC loop-back, DAC forced to DAC_HI -> mean of the calibrated ADC stream
//      DAC constants: GCC = (DAC_HI - DAC_LO) / (m_hi - m_lo), OCC = DAC_LO - GCC*m_lo
//      (the DAC calibration then pre-distorts a requested code so that the ADC
//      reads it back unchanged).
// After each switch change SETTLE samples of the decimated stream are discarded
// (filter and converter settling), then 2^AVG_LOG2 samples are averaged. The
// sequence runs once after reset (power-up calibration) and again on every
// cal_req pulse while idle (online calibration); busy is high meanwhile and done
// pulses at the end. GCC is signed Q2.14 and saturates; a zero measured span
// leaves the previous constants. The use of a switched reference, ground and
// DAC output and the two kinds of calibration follow the CEL; the order of the
// steps, the averaging, the reference code and the test codes are this design's.
module cal_sequencer
  import cel_pkg::*;
#(
  parameter int unsigned        W        = 16,
  parameter int unsigned        SETTLE   = 6,
  parameter int unsigned        AVG_LOG2 = 2,
  parameter logic signed [15:0] REF_CODE = 16'sd16384,  // +5 V on the +-10 V scale
  parameter logic signed [15:0] DAC_LO   = -16'sd16384,
  parameter logic signed [15:0] DAC_HI   = 16'sd16384
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cal_req,
  input  logic                raw_valid,
  input  logic signed [W-1:0] raw_data,
  input  logic                adc_valid,
  input  logic signed [W-1:0] adc_data,
  output cal_sel_e            sel,
  output logic                dac_force,
  output logic signed [W-1:0] dac_code,
  output logic signed [W-1:0] adc_gcc,
  output logic signed [W-1:0] adc_occ,
  output logic signed [W-1:0] dac_gcc,
  output logic signed [W-1:0] dac_occ,
  output logic                busy,
  output logic                done
);
  typedef enum logic [2:0] {S_IDLE, S_SETTLE, S_ACC, S_SOLVE} state_e;

  localparam int unsigned CW = $clog2(SETTLE + (1 << AVG_LOG2) + 1);
  localparam logic signed [W-1:0] ONE = W'(1 << 14);

  state_e                       state;
  logic [1:0]                   ph;
  logic                         pending;
  logic [CW-1:0]                cnt;
  logic signed [W+AVG_LOG2-1:0] acc;
  logic signed [W-1:0]          meas [4];
  logic                         s_valid;
  logic signed [W-1:0]          s_data;

  // Solver (combinational, used in S_SOLVE).
  logic signed [W-1:0]  p_lo, p_hi, q_lo, q_hi;
  logic signed [47:0]   num, den, quo, go;
  logic signed [W-1:0]  g_new, o_new;
  logic                 span_ok;

  always_comb begin
    s_valid = (ph < 2'd2) ? raw_valid : adc_valid;
    s_data  = (ph < 2'd2) ? raw_data  : adc_data;
  end

  always_comb begin
    if (ph == 2'd1) begin
      p_lo = '0;      p_hi = REF_CODE; q_lo = meas[0]; q_hi = meas[1];
    end else begin
      p_lo = DAC_LO;  p_hi = DAC_HI;   q_lo = meas[2]; q_hi = meas[3];
    end
    num     = (48'(p_hi) - 48'(p_lo)) <<< 14;
    den     = 48'(q_hi) - 48'(q_lo);
    span_ok = (den != 0);
    quo     = span_ok ? num / den : 48'(ONE);
    if (quo > 48'(2 ** (W - 1) - 1))   g_new = W'(2 ** (W - 1) - 1);
    else if (quo < -48'(2 ** (W - 1))) g_new = W'(-(2 ** (W - 1)));
    else                               g_new = W'(quo);
    go = 48'(p_lo) - ((48'(g_new) * 48'(q_lo)) >>> 14);
    if (go > 48'(2 ** (W - 1) - 1))    o_new = W'(2 ** (W - 1) - 1);
    else if (go < -48'(2 ** (W - 1)))  o_new = W'(-(2 ** (W - 1)));
    else                               o_new = W'(go);
  end

  always_comb begin
    sel       = SEL_SIGNAL;
    dac_force = 1'b0;
    dac_code  = DAC_LO;
    if (busy) begin
      unique case (ph)
        2'd0: sel = SEL_GROUND;
        2'd1: sel = SEL_REF;
        2'd2: begin sel = SEL_DAC; dac_force = 1'b1; dac_code = DAC_LO; end
        default: begin sel = SEL_DAC; dac_force = 1'b1; dac_code = DAC_HI; end
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      ph      <= '0;
      pending <= 1'b1;          // power-up calibration
      cnt     <= '0;
      acc     <= '0;
      for (int i = 0; i < 4; i++) meas[i] <= '0;
      adc_gcc <= ONE;
      adc_occ <= '0;
      dac_gcc <= ONE;
      dac_occ <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (cal_req) pending <= 1'b1;
      unique case (state)
        S_IDLE: if (pending || cal_req) begin
          pending <= 1'b0;
          ph      <= '0;
          cnt     <= '0;
          state   <= S_SETTLE;
        end
        S_SETTLE: if (s_valid) begin
          if (cnt == CW'(SETTLE - 1)) begin
            cnt   <= '0;
            acc   <= '0;
            state <= S_ACC;
          end else cnt <= cnt + 1'b1;
        end
        S_ACC: if (s_valid) begin
          if (cnt == CW'((1 << AVG_LOG2) - 1)) begin
            meas[ph] <= W'((acc + (W+AVG_LOG2)'(s_data)) >>> AVG_LOG2);
            cnt      <= '0;
            if (ph == 2'd1 || ph == 2'd3) state <= S_SOLVE;
            else begin
              ph    <= ph + 1'b1;
              state <= S_SETTLE;
            end
          end else begin
            acc <= acc + (W+AVG_LOG2)'(s_data);
            cnt <= cnt + 1'b1;
          end
        end
        S_SOLVE: begin
          if (ph == 2'd1) begin
            if (span_ok) begin adc_gcc <= g_new; adc_occ <= o_new; end
            ph    <= 2'd2;
            state <= S_SETTLE;
          end else begin
            if (span_ok) begin dac_gcc <= g_new; dac_occ <= o_new; end
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
