// tb_pipeline_stage: checks the stage model against a real-number
// evaluation of q = vin > thresh, vout = G * (vin - (q - 1/2) * vref),
// with random inputs and random stage errors, the hold when not acquiring,
// and the calibration forcing (grounded input, forced decision).
`timescale 1ns/1ps
module tb_pipeline_stage;
  import adc_cal_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, acq = 1'b0;
  volt_t vin = '0, thresh = '0, vref = '0;
  logic  force_zero = 1'b0, force_q_en = 1'b0, force_q = 1'b0;
  gain_t gain = '0;
  logic  q;
  volt_t vout;

  pipeline_stage dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam real VS = real'(1 << VOLT_FRAC);

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    real g, vi, th, vr, exp_v;
    bit  exp_q;
    logic  q_old;
    volt_t v_old;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      int mode;
      mode       = n % 4;         // 0,1: normal  2: forced  3: no acquire
      g          = 1.81 * (1.0 + 0.01 * ($urandom_range(0, 2000) / 1000.0 - 1.0));
      vi         = 1.2 * ($urandom_range(0, 2000) / 1000.0 - 1.0);
      th         = 0.12 * ($urandom_range(0, 2000) / 1000.0 - 1.0);
      vr         = 1.0 + 0.01 * ($urandom_range(0, 2000) / 1000.0 - 1.0);
      gain       = gain_t'(int'(g * 65536.0));
      vin        = volt_t'(int'(vi * VS));
      thresh     = volt_t'(int'(th * VS));
      vref       = volt_t'(int'(vr * VS));
      force_zero = (mode == 2);
      force_q_en = (mode == 2);
      force_q    = $urandom_range(0, 1) == 1;
      acq        = (mode != 3);
      q_old = q; v_old = vout;
      @(negedge clk);
      // Reference from the quantised inputs actually applied.
      g  = real'(gain) / 65536.0;
      vi = (mode == 2) ? 0.0 : real'(vin) / VS;
      vr = real'(vref) / VS;
      exp_q = (mode == 2) ? force_q : (vi > real'(thresh) / VS);
      exp_v = g * (vi - (exp_q ? vr / 2.0 : -vr / 2.0));
      if (mode == 3) begin
        check(q == q_old && vout == v_old, "holds without acquire");
      end else begin
        check(q == exp_q, $sformatf("q=%0b expected %0b (vin %f)", q, exp_q, vi));
        check((real'(vout) / VS - exp_v) < 4.0 / VS && (real'(vout) / VS - exp_v) > -4.0 / VS,
              $sformatf("vout %f expected %f", real'(vout) / VS, exp_v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
