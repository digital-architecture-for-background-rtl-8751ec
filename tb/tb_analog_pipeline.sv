// tb_analog_pipeline: checks the 18-stage pipeline model with ideal stages
// (gain 1.81, zero thresholds, VREF 1 V) against a real-number model that
// follows every sample through the stages by the sample table of the
// design: a new sample enters stage 1 on each phase-1 edge; at a
// calibration instant stage 1 takes the calibration sample, stage 3 the
// input and odd stage p the residue of stage p-3; the stage under
// calibration, when the calibration sample reaches it, has its input
// grounded and its decision forced. Every decision and residue of every
// stage is compared after every edge; the two extra stages are enabled
// only for moved and calibration samples (residues to within the fixed-point
// rounding, two units grown by the gain of each stage passed), and the moved samples must be seen
// in the two extra stages.
`timescale 1ns/1ps
module tb_analog_pipeline;
  import adc_cal_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0, ph = 1'b0, cal_shift = 1'b0;
  volt_t            x_in = '0;
  logic [N_TOTAL:1] force_zero = '0;
  logic [N_TOTAL:1] stage_en = '1;
  logic             force_q = 1'b0;
  gain_t            gain   [1:N_TOTAL];
  volt_t            thresh [1:N_TOTAL];
  volt_t            vref   [1:N_TOTAL];
  logic [N_TOTAL:1] q;
  volt_t            r [1:N_TOTAL];

  analog_pipeline dut (.*, .extra_en(stage_en[N_TOTAL:N_STAGES+1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #400_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real VS = real'(1 << VOLT_FRAC);
  localparam real G  = real'(GAIN_NOM) / 65536.0;
  localparam int  MAXS = 4096;

  real v_s   [MAXS];   // voltage the sample presents to its next stage
  bit  cal_s [MAXS];
  bit  bad_s [MAXS];   // a decision too close to the threshold to predict
  bit  mv_s  [MAXS];   // moved two stages down at an instant
  int  n_s   [MAXS];   // stages passed (fixed-point rounding grows by G each)
  real etol  [1:N_TOTAL];
  int  id [1:N_TOTAL];
  bit  eq [1:N_TOTAL];
  real er [1:N_TOTAL];
  int  next_id = 1, cal_k = 3, n_extra = 0, n_forced = 0, n_shifts = 0;
  int  n_idle = 0;     // edges on which an extra stage was kept idle

  function automatic int new_sample(bit cal);
    int s = next_id;
    next_id++;
    v_s[s] = real'(x_in) / VS; cal_s[s] = cal; bad_s[s] = 1'b0; n_s[s] = 0; mv_s[s] = cal_shift && !cal;
    return s;
  endfunction

  // Stage p takes sample s (grounded and forced if f).
  function automatic void take(int p, int s, bit f);
    real v;
    bit  qb;
    id[p] = s;
    if (s == 0) return;
    v  = f ? 0.0 : v_s[s];
    qb = f ? force_q : (v > 0.0);
    if (!f && v < 1.0e-6 && v > -1.0e-6) bad_s[s] = 1'b1;
    eq[p] = qb;
    er[p] = G * (v - (qb ? 0.5 : -0.5));
    v_s[s] = er[p];
    n_s[s] = f ? 1 : n_s[s] + 1;
    etol[p] = 2.0 / VS * (G ** n_s[s]);
  endfunction

  always @(posedge clk) if (rst_n) begin
    int oid [1:N_TOTAL];
    oid = id;
    if (!ph) begin
      if (cal_shift) n_shifts++;
      for (int p = 1; p <= N_TOTAL; p += 2) begin
        if (p == 1)                     take(1, new_sample(cal_shift), force_zero[1]);
        else if (cal_shift && p == 3)   take(3, new_sample(1'b0), force_zero[3]);
        else if (!stage_en[p]) begin
          id[p] = 0;                     // idle: holds, carries nothing
          n_idle++;
        end
        else if (cal_shift && p >= 5) begin
          take(p, oid[p-3], force_zero[p]);
          if (oid[p-3] != 0) mv_s[oid[p-3]] = 1'b1;
        end
        else                            take(p, oid[p-1], force_zero[p]);
      end
    end else begin
      for (int p = 2; p <= N_TOTAL; p += 2) begin
        if (stage_en[p]) take(p, oid[p-1], force_zero[p]);
        else begin id[p] = 0; n_idle++; end
      end
    end
    if (force_zero != '0) n_forced++;
  end

  always @(negedge clk) if (rst_n) begin
    for (int p = 1; p <= N_TOTAL; p++) begin
      if (id[p] != 0 && !bad_s[id[p]]) begin
        real d;
        d = real'(r[p]) / VS - er[p];
        check(q[p] == eq[p], $sformatf("stage %0d q=%0b expected %0b", p, q[p], eq[p]));
        check(d < etol[p] && d > -etol[p],
              $sformatf("stage %0d residue %f expected %f", p, real'(r[p]) / VS, er[p]));
        if (p > N_STAGES && mv_s[id[p]]) n_extra++;
      end
    end
    // Extra stages sample only a moved or calibration sample.
    stage_en = '1;
    for (int p = N_STAGES + 1; p <= N_TOTAL; p++) begin
      int src;
      bit odd_edge;
      odd_edge = (p % 2 == 1);
      if (odd_edge == !ph) begin        // the coming edge is this stage's
        src = (odd_edge && cal_shift) ? id[p-3] : id[p-1];
        stage_en[p] = src != 0 && (cal_s[src] || mv_s[src] || (odd_edge && cal_shift));
      end else begin
        stage_en[p] = 1'b0;
      end
    end
    // Force the stage under calibration when the calibration sample comes.
    force_zero = '0;
    if (cal_k % 2 == 1 && !ph) begin      // coming edge is a phase-1 edge
      if (cal_k == 1) force_zero[1] = cal_shift;
      else if (!cal_shift) force_zero[cal_k] = id[cal_k-1] != 0 && cal_s[id[cal_k-1]];
    end
    if (cal_k % 2 == 0 && ph) force_zero[cal_k] = id[cal_k-1] != 0 && cal_s[id[cal_k-1]];
  end

  initial begin
    for (int p = 1; p <= N_TOTAL; p++) begin
      gain[p] = gain_t'(GAIN_NOM); thresh[p] = '0; vref[p] = volt_t'(VREF_NOM);
      id[p] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      forever @(posedge clk) ph <= !ph;
      forever begin
        @(negedge clk);
        if (ph) x_in = volt_t'(int'(1.1 * VS * ($urandom_range(0, 2000) / 1000.0 - 1.0)));
      end
    join_none
    for (int n = 0; n < 24; n++) begin
      // Controls change just after a rising edge, so that the negedge
      // block sees them settled.
      repeat (2 * (CAL_INTERVAL + $urandom_range(0, 4))) @(posedge clk);
      #1;
      if (ph) begin @(posedge clk); #1; end  // ph = 0: next edge is phase 1
      cal_k   = (n % 9) + 1;
      force_q = 1'($urandom);
      cal_shift = 1'b1;
      @(posedge clk); #1;
      cal_shift = 1'b0;
    end
    repeat (40) @(negedge clk);
    $display("extra-stage samples=%0d forced=%0d", n_extra, n_forced);
    check(n_extra > 0, "moved samples used the extra stages");
    check(n_shifts == 24, "instants seen");
    check(n_forced == 24, "one forced stage per instant");
    check(n_idle > 0, "extra stages idle outside calibration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
