// digital_encoder: forms the output code D = sum q_i * w_i of every sample
// and the measurement D_S of the calibration sample.
//
// A token register per stage travels alongside the analog sample that the
// stage holds: it records what the sample is (input sample, calibration
// sample or nothing), whether the sample was moved two stages down at a
// calibration instant, and the partial sum of q_j * w_j over the stages the
// sample has already left. When a sample leaves stage p its decision q_p is
// added with the weight of its logical position: p for an unmoved sample,
// p-2 for a moved one. This is how the weights of stages 1, 2, 3, ... are
// made available at stages 3, 4, 5, ... during calibration, as the document
// requires. Tokens move with the same routing as the analog samples
// (analog_pipeline): on a calibration instant odd stage p takes the token
// of stage p-3, stage 3 starts a new input sample, and stage 1 starts the
// calibration sample.
//
// The calibration sample is discarded up to and including the stage under
// calibration (`cal_stage`); `force_zero` tells the analog pipeline to
// ground that stage's input and force its decision when the calibration
// sample reaches it. `extra_en` lets the two extra stages sample only when
// a moved sample or the calibration sample reaches them, so that they are
// idle outside calibration, as the document states. Its sum over the stages after cal_stage, down to stage
// 18, is returned as `ds` on the phase-1 edge after it leaves stage 18.
//
// Timing: clk runs at two phases per sample (`ph` = 0 marks a phase-1 edge).
// An input sample taken by stage 1 on a phase-1 edge appears on `dout` 16
// phases (8 sample cycles) later, `dout_valid` high for the one clock after
// that phase-1 edge; moved samples reach the output at the same time as they
// would have unmoved, so one code comes out per sample cycle without gaps.
// `dout` is the sum rounded to OUT_BITS and clipped to the code range.
//
// Own choices: the token scheme (the document gives only the function of
// the encoder), the weight format, the rounding, and the use of the two
// extra stages (weights G**-1, G**-2) in the calibration measurement.
module digital_encoder
  import adc_cal_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ph,          // 0: phase-1 edge, 1: phase-2 edge
  input  logic                cal_shift,   // calibration instant (phase-1 edge)
  input  stage_idx_t          cal_stage,   // stage being calibrated, 1..N_TOTAL
  input  logic [N_TOTAL:1]    q,           // stage decisions
  input  weight_t             w [1:N_TOTAL], // weights by logical position
  output logic [N_TOTAL:1]    force_zero,  // to analog_pipeline
  output logic [N_TOTAL:N_STAGES+1] extra_en, // to analog_pipeline: extra stage may sample
  output logic [OUT_BITS-1:0] dout,
  output logic                dout_valid,
  output logic                dout_shifted, // code came from a moved sample
  output weight_t             ds,          // calibration measurement D_S
  output logic                ds_valid
);

  token_t tok  [1:N_TOTAL];   // token of the sample held by each stage
  token_t tadv [1:N_TOTAL];   // token of that sample once it leaves the stage
  token_t tin  [1:N_TOTAL];   // token each stage takes on its next edge
  weight_t fin [1:N_TOTAL];   // sum including the stage's own decision

  localparam weight_t CODE_MAX = weight_t'(((1 << OUT_BITS) - 1)) << WEIGHT_FRAC;

  // Logical position of stage p for a token.
  function automatic int unsigned lpos(int unsigned p, logic shifted);
    return shifted ? p - 2 : p;
  endfunction

  always_comb begin
    for (int unsigned p = 1; p <= N_TOTAL; p++) begin
      int unsigned pos;
      pos    = lpos(p, tok[p].shifted);
      if (pos < 1) pos = 1;
      fin[p] = tok[p].psum + (q[p] ? w[pos] : '0);
      tadv[p] = tok[p];
      if (tok[p].kind == TK_CAL && pos <= 32'(cal_stage)) begin
        tadv[p].psum = '0;
      end else begin
        tadv[p].psum = fin[p];
      end
      if (tok[p].kind == TK_SAMPLE && pos >= N_STAGES) begin
        tadv[p].kind = TK_EMPTY;    // conversion finished
      end
    end
  end

  always_comb begin
    for (int unsigned p = 1; p <= N_TOTAL; p++) begin
      if (p == 1) begin
        tin[p] = '{kind: cal_shift ? TK_CAL : TK_SAMPLE, shifted: 1'b0, psum: '0};
      end else if (cal_shift && !ph && (p % 2 == 1)) begin
        if (p == 3) begin
          tin[p] = '{kind: TK_SAMPLE, shifted: 1'b1, psum: '0};
        end else begin
          tin[p]         = tadv[p-3];
          tin[p].shifted = 1'b1;
        end
      end else begin
        tin[p] = tadv[p-1];
      end
      force_zero[p] = ((p % 2 == 1) ? !ph : ph) && tin[p].kind == TK_CAL
                      && p == 32'(cal_stage);
      // The extra stages sample only when a moved or calibration sample
      // comes to them; otherwise they stay idle.
    end
    for (int unsigned p = N_STAGES + 1; p <= N_TOTAL; p++) begin
      extra_en[p] = tin[p].kind != TK_EMPTY;
    end
  end

  for (genvar p = 1; p <= N_TOTAL; p++) begin : g_tok
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        tok[p] <= '{kind: TK_EMPTY, shifted: 1'b0, psum: '0};
      end else if ((p % 2 == 1) ? !ph : ph) begin
        tok[p] <= tin[p];
      end
    end
  end

  // Output codes and calibration measurements leave on phase-1 edges.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout         <= '0;
      dout_valid   <= 1'b0;
      dout_shifted <= 1'b0;
      ds           <= '0;
      ds_valid     <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      ds_valid   <= 1'b0;
      if (!ph) begin
        if (tok[N_STAGES].kind == TK_SAMPLE && !tok[N_STAGES].shifted) begin
          dout         <= round_code(fin[N_STAGES]);
          dout_valid   <= 1'b1;
          dout_shifted <= 1'b0;
        end else if (tok[N_TOTAL].kind == TK_SAMPLE && tok[N_TOTAL].shifted) begin
          dout         <= round_code(fin[N_TOTAL]);
          dout_valid   <= 1'b1;
          dout_shifted <= 1'b1;
        end
        if (tok[N_TOTAL].kind == TK_CAL) begin
          ds       <= fin[N_TOTAL];
          ds_valid <= 1'b1;
        end
      end
    end
  end

  function automatic logic [OUT_BITS-1:0] round_code(weight_t v);
    weight_t r;
    r = (v > CODE_MAX) ? CODE_MAX : v + weight_t'(1 << (WEIGHT_FRAC - 1));
    if (r > CODE_MAX) r = CODE_MAX;
    return r[WEIGHT_FRAC +: OUT_BITS];
  endfunction

  // Calibration instants must be far enough apart that no moved sample is
  // still in flight: a second move would push it past the last stage.
  logic any_shifted;
  always_comb begin
    any_shifted = 1'b0;
    for (int unsigned p = 1; p <= N_TOTAL; p++) begin
      if (tok[p].kind != TK_EMPTY && tok[p].shifted) any_shifted = 1'b1;
    end
  end

  a_no_double_shift: assert property (@(posedge clk) disable iff (!rst_n)
    (cal_shift && !ph) |-> !any_shifted)
    else $error("calibration instant while moved samples are in flight");

endmodule
