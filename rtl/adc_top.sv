// adc_top: 14-bit pipeline ADC, 1 bit per stage, with continuous digital
// background calibration.
//
// Sixteen stages of nominal gain 1.81 convert each sample; two extra stages
// at the end let the converter free one conversion slot for calibration
// without stopping: at a calibration instant every sample in flight jumps
// two stages down the pipeline, a calibration sample enters stage 1, and
// the stage under calibration, when that sample reaches it, has its input
// grounded and its decision forced. The remaining stages digitise its
// residue, and from the two results (decision forced to 0 and to 1) the
// calibration logic computes a new weight for that stage. Output codes
// D = sum q_i * w_i keep coming out once per sample cycle, with the same
// latency, throughout.
//
// Blocks: analog_pipeline (behavioural model of the 18 stages and their
// switches), digital_encoder (output codes, sample tracking, weight
// selection for moved samples), weight_bank (programmable weights) and
// cal_controller (sequence of calibration instants and weight update).
//
// Clocking: `clk` runs at twice the sample rate; each edge ends one of the
// two non-overlapping phases. `phi1` is high in the clock period whose
// closing edge is a phase-1 edge (odd stages sample, a new input sample is
// taken, an output code is produced). `x_in` is sampled on phase-1 edges.
// The per-stage `gain`, `thresh` and `vref` inputs set the analog errors of
// the model, as in the document's simulations. Output latency: 16 phases.
module adc_top
  import adc_cal_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  volt_t               x_in,
  input  gain_t               gain   [1:N_TOTAL],
  input  volt_t               thresh [1:N_TOTAL],
  input  volt_t               vref   [1:N_TOTAL],
  input  logic                cal_start,
  output logic                phi1,
  output logic [OUT_BITS-1:0] dout,
  output logic                dout_valid,
  output logic                dout_shifted,
  output logic                cal_busy,
  output logic                cal_done,
  output logic                cal_shift,    // calibration instant
  output logic                cal_force,    // stage under calibration takes the calibration sample
  output logic                weight_we,    // a calibrated weight is written
  output weight_t             weights [1:N_TOTAL]
);

  logic              ph;        // 0: next edge is a phase-1 edge
  logic [N_TOTAL:1]  q;
  logic [N_TOTAL:1]  force_zero;
  logic [N_TOTAL:N_STAGES+1] extra_en;
  stage_idx_t        cal_stage;
  logic              force_q;
  weight_t           ds;
  logic              ds_valid;
  logic              we;
  stage_idx_t        widx;
  weight_t           wdata;

  // Phase flag standing in for the two-phase clock generator.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph <= 1'b0;
    else        ph <= !ph;
  end
  assign phi1      = !ph;
  assign cal_force = |force_zero;
  assign weight_we = we;

  analog_pipeline u_analog (
    .clk       (clk),
    .rst_n     (rst_n),
    .ph        (ph),
    .x_in      (x_in),
    .cal_shift (cal_shift),
    .extra_en  (extra_en),
    .force_zero(force_zero),
    .force_q   (force_q),
    .gain      (gain),
    .thresh    (thresh),
    .vref      (vref),
    .q         (q),
    .r         ()   // residues stay inside the pipeline
  );

  digital_encoder u_enc (
    .clk         (clk),
    .rst_n       (rst_n),
    .ph          (ph),
    .cal_shift   (cal_shift),
    .cal_stage   (cal_stage),
    .q           (q),
    .w           (weights),
    .force_zero  (force_zero),
    .extra_en    (extra_en),
    .dout        (dout),
    .dout_valid  (dout_valid),
    .dout_shifted(dout_shifted),
    .ds          (ds),
    .ds_valid    (ds_valid)
  );

  weight_bank u_wb (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (we),
    .widx (widx),
    .wdata(wdata),
    .w    (weights)
  );

  cal_controller u_ctl (
    .clk      (clk),
    .rst_n    (rst_n),
    .ph       (ph),
    .cal_start(cal_start),
    .ds       (ds),
    .ds_valid (ds_valid),
    .cal_shift(cal_shift),
    .cal_stage(cal_stage),
    .force_q  (force_q),
    .we       (we),
    .widx     (widx),
    .wdata    (wdata),
    .busy     (cal_busy),
    .cal_done (cal_done)
  );

endmodule
