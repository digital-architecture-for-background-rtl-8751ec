// pipeline_stage: behavioural model of one 1-bit pipeline ADC stage.
//
// This is a model of an analog block, written in fixed point so that it
// simulates with a two-state simulator; it is not meant to be synthesized
// into a real converter. It stands for the sample and hold, the one-
// comparator sub-ADC, the two-level sub-DAC, the subtractor and the
// interstage gain of one stage (the switched-capacitor MDAC).
//
// On a clock edge with `acq` high the stage samples its input and holds,
// until its next acquisition, the decision and the residue
//     q    = vin > thresh
//     vout = gain * (vin - (q - 1/2) * vref)
// which is the stage transfer of the document (zero-volt comparator
// threshold, sub-DAC levels -VREF/2 and +VREF/2, gain G). Gain, threshold
// and sub-DAC reference are inputs so that each stage can be given its own
// errors, as the document does in its simulations.
//
// For calibration the input can be grounded (`force_zero`) and the decision
// forced (`force_q_en`, `force_q`), which makes the stage produce S1
// (q = 0) or S2 (q = 1). Both follow the document; the fixed-point formats
// (volt_t: 1 V = 2**24, gain_t: 16 fractional bits) and the rounding of the
// product are this model's own choices. No saturation of the amplifier is
// modelled.
//
// Timing: outputs change on the acquiring edge and are held for two phases.
module pipeline_stage
  import adc_cal_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  acq,         // this stage's sampling phase
  input  volt_t vin,         // residue of the previous stage or the input
  input  logic  force_zero,  // ground the input (calibration)
  input  logic  force_q_en,  // override the comparator (calibration)
  input  logic  force_q,
  input  gain_t gain,        // interstage gain, GAIN_FRAC fractional bits
  input  volt_t thresh,      // comparator threshold
  input  volt_t vref,        // sub-DAC reference (levels +-vref/2)
  output logic  q,           // coarse decision
  output volt_t vout         // residue passed to the next stage
);

  volt_t             v_s;
  logic              q_n;
  volt_t             v_dac;
  logic signed [63:0] prod;
  volt_t             vout_n;

  always_comb begin
    v_s    = force_zero ? '0 : vin;
    q_n    = force_q_en ? force_q : (v_s > thresh);
    v_dac  = q_n ? (vref >>> 1) : -(vref >>> 1);
    prod   = 64'(v_s - v_dac) * $signed({1'b0, gain});
    vout_n = volt_t'((prod + 64'(longint'(1) << (GAIN_FRAC - 1))) >>> GAIN_FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= 1'b0;
      vout <= '0;
    end else if (acq) begin
      q    <= q_n;
      vout <= vout_n;
    end
  end

endmodule
