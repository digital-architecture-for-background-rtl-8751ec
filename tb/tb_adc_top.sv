// tb_adc_top: end-to-end test of the calibrated pipeline ADC at its
// default size.
//
// Part A, ideal stages: random input samples; every output code is compared
// with a real-number model of an ideal 16-stage, gain-1.81 pipeline, and its
// latency (8 sample cycles) and the absence of gaps are checked, also while
// a full calibration run moves samples down the pipeline. The expected code
// uses the weights the DUT holds at the time. With ideal stages the
// calibrated weights must stay within 0.1 % + 1 LSB of the nominal ones.
//
// Part B, stages with errors: gain, comparator and sub-DAC errors in all 18
// stages, a 150 kHz sine of 0.994 V sampled at 51.2 MHz, 1024 samples,
// calibration started at sample 350. The deviation of the codes from their
// best straight-line fit must be large before calibration and within
// 3 LSB after it, and the effective number of bits (from the same fit and
// the sine amplitude) must rise by more than 2 bits. The run must take
// 154 sample cycles from its first calibration instant to cal_done.
// Stage errors in all 18 stages: gain error of 0.1-0.5 %, random sign;
// comparator offsets up to 0.112 V (10 % of VFS); sub-DAC reference
// errors up to 0.1 %. The result must also exceed 12.5 effective bits.
//
// Each mechanism (calibration instant, moved sample reaching the output,
// forced stage, weight write) is counted and must occur.
`timescale 1ns/1ps
module tb_adc_top;
  import adc_cal_pkg::*;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  volt_t               x_in = '0;
  gain_t               gain   [1:N_TOTAL];
  volt_t               thresh [1:N_TOTAL];
  volt_t               vref   [1:N_TOTAL];
  logic                cal_start = 1'b0;
  logic                phi1;
  logic [OUT_BITS-1:0] dout;
  logic                dout_valid, dout_shifted, cal_busy, cal_done, cal_shift;
  logic                cal_force, weight_we;
  weight_t             weights [1:N_TOTAL];

  adc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_shift = 0, n_shifted_out = 0, n_forced = 0, n_wr = 0;
  int last_wr = -100;            // cycle of the last weight write
  int t_first = 0;               // cycle of the first instant of part B
  int cycle = 0;                 // phase-1 edges since reset

  localparam real G = real'(GAIN_NOM) / 65536.0;
  localparam real W_IN = 2.0 * 3.14159265358979 * 150.0e3 / 51.2e6;  // rad per sample
  localparam real X_AMP = 0.994;                                      // -1 dBFS, V

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Ideal pipeline of the document: 16 stages, gain G, VREF 1 V.
  function automatic real ideal_code(real x);
    real v = x, d = 0.0;
    for (int i = 1; i <= N_STAGES; i++) begin
      bit qb = (v > 0.0);
      d += qb ? G ** (N_STAGES - i) : 0.0;
      v = G * (v - (qb ? 0.5 : -0.5));
    end
    return d;
  endfunction

  // Ideal decisions of x weighted with the weights held by the DUT.
  function automatic real code_with_weights(real x);
    real v = x, d = 0.0;
    for (int i = 1; i <= N_STAGES; i++) begin
      bit qb = (v > 0.0);
      d += qb ? real'(weights[i]) / real'(1 << WEIGHT_FRAC) : 0.0;
      v = G * (v - (qb ? 0.5 : -0.5));
    end
    return d;
  endfunction

  // Input queue: value and cycle of each sample taken.
  real x_q[$];
  int  c_q[$];
  bit  compare_ideal = 1'b1;
  bit  filled = 1'b0;
  real xs[$];   // part B: sample value of each output code
  real ds_[$];  // part B: output code
  int  gaps = 0;

  // Watchdog.
  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor on every edge: bookkeeping before the edge's effects.
  always @(posedge clk) if (rst_n) begin
    if (cal_force) n_forced++;
    if (weight_we) begin
      n_wr++;
      last_wr = cycle;
    end
    if (phi1) begin
      cycle++;
      if (cal_shift) begin
        n_shift++;
        if (!compare_ideal && t_first == 0) t_first = cycle;
      end
      x_q.push_back(real'(x_in) / real'(1 << VOLT_FRAC));
      c_q.push_back(cycle);
    end
  end

  // Output side: sampled after the edge.
  always @(negedge clk) if (rst_n) begin
    if (!phi1 && filled && !dout_valid) gaps++;
    if (dout_valid) begin
      real x;
      int  c;
      filled = 1'b1;
      x = x_q.pop_front();
      c = c_q.pop_front();
      if (dout_shifted) n_shifted_out++;
      check(cycle - c == 8, $sformatf("latency %0d cycles", cycle - c));
      if (compare_ideal) begin
        // Expected: the ideal decisions weighted with the weights now in
        // the bank; a sample in flight while a weight changed gets a wider
        // margin (weights move by a few LSB with ideal stages).
        real e, tol;
        e = real'(dout) - code_with_weights(x);
        tol = (last_wr >= c) ? 4.0 : 1.5;
        check(e < tol && e > -tol,
              $sformatf("x=%f code %0d ideal %f shifted=%0b", x, dout, ideal_code(x), dout_shifted));
      end else begin
        xs.push_back(x);
        ds_.push_back(real'(dout));
      end
    end
  end

  task automatic do_reset();
    rst_n = 1'b0;
    filled = 1'b0;
    x_q.delete(); c_q.delete();
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Largest deviation from the least-squares line through (xs, ds_)
  // between indices lo and hi-1.
  function automatic real fit_dev(int lo, int hi);
    real sx = 0, sy = 0, sxx = 0, sxy = 0, n, a, b, m = 0;
    for (int i = lo; i < hi; i++) begin
      sx += xs[i]; sy += ds_[i]; sxx += xs[i]*xs[i]; sxy += xs[i]*ds_[i];
    end
    n = real'(hi - lo);
    a = (n*sxy - sx*sy) / (n*sxx - sx*sx);
    b = (sy - a*sx) / n;
    for (int i = lo; i < hi; i++) begin
      real e = ds_[i] - (a*xs[i] + b);
      if (e < 0) e = -e;
      if (e > m) m = e;
    end
    return m;
  endfunction

  // Effective number of bits of output codes lo..hi-1: straight-line fit
  // of the codes against the input values (the sine itself), SINAD from
  // the fitted sine amplitude and the rms of what is left.
  function automatic real enob(int lo, int hi);
    real sx = 0, sy = 0, sxx = 0, sxy = 0, ss = 0, n, a, b, amp, rms;
    for (int i = lo; i < hi; i++) begin
      sx += xs[i]; sy += ds_[i]; sxx += xs[i]*xs[i]; sxy += xs[i]*ds_[i];
    end
    n = real'(hi - lo);
    a = (n*sxy - sx*sy) / (n*sxx - sx*sx);
    b = (sy - a*sx) / n;
    for (int i = lo; i < hi; i++) begin
      real e;
      e = ds_[i] - (a*xs[i] + b);
      ss += e * e;
    end
    rms = $sqrt(ss / n);
    amp = a * X_AMP;
    return (20.0 * $log10(amp / $sqrt(2.0) / rms) - 1.76) / 6.02;
  endfunction

  int t_start, t_done;
  real enob_before, enob_after;
  real dev_before, dev_after;

  initial begin
    // ---------------- Part A: ideal stages ----------------
    for (int p = 1; p <= N_TOTAL; p++) begin
      gain[p] = gain_t'(GAIN_NOM); thresh[p] = '0; vref[p] = volt_t'(VREF_NOM);
    end
    do_reset();
    for (int n = 0; n < 300; n++) begin
      // new input on each phase-1 edge, changed in phase 2
      @(negedge clk iff !phi1);
      x_in = volt_t'($signed($urandom_range(0, 2 * (1 << VOLT_FRAC))) - (1 << VOLT_FRAC));
      if (n == 20) begin
        @(negedge clk); cal_start = 1'b1; @(negedge clk); cal_start = 1'b0;
      end
    end
    check(cal_done, "calibration with ideal stages finished");
    for (int p = 1; p <= CAL_FIRST; p++) begin
      real d, lim;
      d   = real'(int'(weights[p]) - int'(nominal_weight(p)));
      lim = real'(nominal_weight(p)) * 0.001 + real'(1 << WEIGHT_FRAC);
      check(d < lim && d > -lim,
            $sformatf("ideal weight %0d: %0d vs nominal %0d", p, weights[p], nominal_weight(p)));
    end
    check(gaps == 0, $sformatf("%0d missing output codes", gaps));

    // ---------------- Part B: stages with errors ----------------
    compare_ideal = 1'b0;
    // Error sizes of the document's simulation: capacitor mismatch of
    // 0.1-0.5 % (here as gain error of that size and random sign) and
    // comparator offsets up to 10 % of VFS, in all 18 stages; sub-DAC
    // reference errors up to 0.1 % are this testbench's addition.
    for (int p = 1; p <= N_TOTAL; p++) begin
      real eg, ev, et;
      eg = (0.001 + 0.004 * $urandom_range(0, 1000) / 1000.0) * ($urandom_range(0, 1) ? 1.0 : -1.0);
      ev = 0.001 * ($urandom_range(0, 2000) / 1000.0 - 1.0);
      et = 0.112 * ($urandom_range(0, 2000) / 1000.0 - 1.0);
      gain[p]   = gain_t'(int'(real'(GAIN_NOM) * (1.0 + eg)));
      vref[p]   = volt_t'(int'(real'(VREF_NOM) * (1.0 + ev)));
      thresh[p] = volt_t'(int'(real'(VREF_NOM) * et));
    end
    do_reset();
    gaps = 0;
    for (int n = 0; n < 1024 + 8; n++) begin
      @(negedge clk iff !phi1);
      x_in = volt_t'(int'(X_AMP * $sin(W_IN * n)
                          * real'(VREF_NOM)));
      if (n == 350) begin
        @(negedge clk); cal_start = 1'b1; t_start = cycle;
        @(negedge clk); cal_start = 1'b0;
      end
      if (cal_done && t_done == 0) t_done = cycle;
    end
    $display("calibration took %0d cycles from the first instant (%0d from cal_start)",
             t_done - t_first, t_done - t_start);
    check(t_done - t_first == 154, $sformatf("calibration time %0d cycles", t_done - t_first));
    dev_before = fit_dev(0, 340);
    dev_after  = fit_dev(520, 1024);
    $display("max deviation from line: before %f LSB, after %f LSB", dev_before, dev_after);
    enob_before = enob(0, 340);
    enob_after  = enob(520, 1024);
    $display("ENOB: before %f bits, after %f bits", enob_before, enob_after);
    check(enob_after - enob_before > 2.0, "calibration gains more than 2 effective bits");
    check(enob_after > 12.5, "more than 12.5 effective bits after calibration");
    check(dev_before > 4.0, "errors visible before calibration");
    check(dev_after <= 3.0, "linear within 3 LSB after calibration");
    check(gaps == 0, $sformatf("%0d missing output codes", gaps));

    // Mechanisms.
    $display("instants=%0d moved outputs=%0d forced=%0d writes=%0d", n_shift, n_shifted_out, n_forced, n_wr);
    check(n_shift == 28, "calibration instants (14 per run)");
    check(n_shifted_out > 0, "moved samples reached the output");
    check(n_forced == 28, "stage under calibration forced");
    check(n_wr == 14, "weight writes (7 per run)");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
