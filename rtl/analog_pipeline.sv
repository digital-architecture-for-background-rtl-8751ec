// analog_pipeline: behavioural model of the 18-stage analog pipeline with
// the switches of the background calibration.
//
// Sixteen stages convert a sample; two more stages at the end are used only
// by samples that were moved down the pipeline at a calibration instant.
// Odd stages sample on phase 1, even stages on phase 2 (`ph` = 0 marks a
// clock edge that ends phase 2 and starts phase 1, so that odd stages
// acquire on it). A new input sample enters stage 1 on every phase-1 edge.
//
// At a calibration instant (`cal_shift` on a phase-1 edge) every sample in
// flight jumps two stages: stage 3 takes the input signal, stage 5 takes
// the residue of stage 2, and in general odd stage p takes the residue of
// stage p-3 instead of p-1; stage 1 meanwhile takes a dummy sample that
// will become the calibration sample. The two extra stages sample only
// when their `extra_en` bit is set; the digital side sets it only when a
// moved sample or the calibration sample is coming, so they are active
// only during calibration. Stages that `force_zero` selects have
// their input grounded and their decision forced to `force_q`; the digital
// side asserts it for the stage under calibration when the calibration
// sample reaches it. This routing follows the document's sample table;
// modelling the analog switches as ideal is this model's own choice.
//
// The model is written in fixed point (volt_t: 1 V = 2**24) and is not an
// implementation of the analog circuit.
module analog_pipeline
  import adc_cal_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ph,         // 0: phase-1 edge, 1: phase-2 edge
  input  volt_t                x_in,       // converter input, held by the S/H
  input  logic                 cal_shift,  // calibration instant (phase-1 edge)
  input  logic [N_TOTAL:N_STAGES+1] extra_en, // extra stage may sample (idle otherwise)
  input  logic [N_TOTAL:1]     force_zero, // ground input and force decision
  input  logic                 force_q,    // forced decision value
  input  gain_t                gain   [1:N_TOTAL],
  input  volt_t                thresh [1:N_TOTAL],
  input  volt_t                vref   [1:N_TOTAL],
  output logic [N_TOTAL:1]     q,          // stage decisions
  output volt_t                r      [1:N_TOTAL]  // stage residues
);

  volt_t vin [1:N_TOTAL];

  always_comb begin
    for (int p = 1; p <= N_TOTAL; p++) begin
      if (p == 1) begin
        vin[p] = x_in;
      end else if (cal_shift && !ph && (p % 2 == 1)) begin
        vin[p] = (p == 3) ? x_in : r[p-3];
      end else begin
        vin[p] = r[p-1];
      end
    end
  end

  for (genvar p = 1; p <= N_TOTAL; p++) begin : g_stage
    pipeline_stage u_stage (
      .clk       (clk),
      .rst_n     (rst_n),
      .acq       (((p % 2 == 1) ? !ph : ph) && (p <= N_STAGES || extra_en[p])),
      .vin       (vin[p]),
      .force_zero(force_zero[p]),
      .force_q_en(force_zero[p]),
      .force_q   (force_q),
      .gain      (gain[p]),
      .thresh    (thresh[p]),
      .vref      (vref[p]),
      .q         (q[p]),
      .vout      (r[p])
    );
  end

endmodule
