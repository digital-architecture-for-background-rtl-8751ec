// adc_cal_pkg: shared constants and types of the background-calibrated
// pipeline ADC.
//
// The converter is 14 bits, 1 bit per stage, 16 identical stages plus two
// extra stages at the end that are used only while a calibration sample is
// in flight. The nominal interstage gain is 1.81 and VREF is 1 V; these
// numbers follow the document. Everything else here (fixed-point formats,
// word widths, the calibration spacing) is this design's own choice.
//
// Number formats
//   volt_t   : signed, VOLT_FRAC fractional bits, 1 V = 2**24. Used by the
//              behavioural stage models for analog voltages.
//   gain_t   : unsigned, GAIN_FRAC fractional bits (1.81 -> 118620).
//   weight_t : unsigned stage weight in output LSBs with WEIGHT_FRAC
//              fractional bits. Output LSB = weight of stage 16.
package adc_cal_pkg;

  // Pipeline geometry (document).
  localparam int unsigned N_STAGES  = 16;              // conversion stages
  localparam int unsigned N_EXTRA   = 2;               // calibration stages
  localparam int unsigned N_TOTAL   = N_STAGES + N_EXTRA;
  localparam int unsigned OUT_BITS  = 14;              // output resolution
  localparam int unsigned CAL_FIRST = 7;               // stages 7..1 are calibrated

  // Fixed-point formats (own choice).
  localparam int unsigned VOLT_W      = 32;
  localparam int unsigned VOLT_FRAC   = 24;
  localparam int unsigned GAIN_W      = 18;
  localparam int unsigned GAIN_FRAC   = 16;
  localparam int unsigned WEIGHT_FRAC = 8;
  localparam int unsigned WEIGHT_W    = OUT_BITS + 2 + WEIGHT_FRAC;
  localparam int unsigned WEIGHT_XF   = 24;  // guard bits for nominal weights

  // Nominal analog values (document: G = 1.81, VREF = 1 V).
  localparam int unsigned GAIN_NOM  = 118620;          // round(1.81 * 2**16)
  localparam int          VREF_NOM  = 1 << VOLT_FRAC;  // 1 V

  // Calibration instants are CAL_INTERVAL sample cycles apart, two per
  // calibrated stage: 14 * 11 = 154 cycles for 7 stages (own reading of
  // the 154-cycle figure).
  localparam int unsigned CAL_INTERVAL = 11;

  localparam int unsigned IDX_W = $clog2(N_TOTAL + 1); // stage index 1..18

  typedef logic signed [VOLT_W-1:0]   volt_t;
  typedef logic        [GAIN_W-1:0]   gain_t;
  typedef logic        [WEIGHT_W-1:0] weight_t;
  typedef logic        [IDX_W-1:0]    stage_idx_t;

  // What a stage of the pipeline is holding.
  typedef enum logic [1:0] {
    TK_EMPTY  = 2'd0,  // nothing that will be used
    TK_SAMPLE = 2'd1,  // a sample of the input signal
    TK_CAL    = 2'd2   // the artificial calibration sample
  } token_kind_e;

  // Digital companion of the analog sample held by one stage.
  typedef struct packed {
    token_kind_e kind;
    logic        shifted;  // moved two stages down at a calibration instant
    weight_t     psum;     // sum of q_j * w_j over the stages already passed
  } token_t;

  // Nominal weight of logical stage position pos (1..N_TOTAL):
  // G**(N_STAGES - pos) output LSBs; positions 17 and 18 lie below the LSB.
  // Worked with 24 extra fractional bits, then rounded.
  function automatic weight_t nominal_weight(int unsigned pos);
    longint unsigned w;
    w = longint'(1) << (WEIGHT_FRAC + WEIGHT_XF);
    for (int unsigned i = pos; i < N_STAGES; i++) begin
      w = (w * GAIN_NOM + (longint'(1) << (GAIN_FRAC - 1))) >> GAIN_FRAC;
    end
    for (int unsigned i = N_STAGES; i < pos; i++) begin
      w = (w << GAIN_FRAC) / longint'(GAIN_NOM);
    end
    return weight_t'((w + (longint'(1) << (WEIGHT_XF - 1))) >> WEIGHT_XF);
  endfunction

endpackage
