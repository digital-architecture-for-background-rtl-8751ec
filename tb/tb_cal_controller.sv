// tb_cal_controller: drives the controller with a stand-in for the
// encoder that answers every calibration instant 9 sample cycles later
// (the flight time of the calibration sample through 18 stages) with a
// random measurement chosen per stage and forced decision. Checks: the
// stage order 7, 6, ..., 1 with decision 0 then 1, stable cal_stage and
// force_q while a measurement is pending, instants exactly 11 cycles
// apart within a run (at least 11 between runs) and only on phase-1 edges, each weight written as D_S1 - D_S2 to
// the right stage, 154 cycles from the first instant to cal_done, and a
// second run started right away keeping the spacing.
`timescale 1ns/1ps
module tb_cal_controller;
  import adc_cal_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, ph = 1'b0, cal_start = 1'b0;
  weight_t    ds = '0;
  logic       ds_valid = 1'b0;
  logic       cal_shift, force_q, we, busy, cal_done;
  stage_idx_t cal_stage, widx;
  weight_t    wdata;

  cal_controller dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ph <= rst_n ? !ph : 1'b0;

  int checks = 0, failures = 0;
  int cycle = 0, last_instant = -1, first_instant = -1, n_inst = 0, n_wr = 0;
  int pend = -1;                    // cycle at which to answer
  stage_idx_t pend_stage;
  logic       pend_q;
  weight_t    meas [1:CAL_FIRST][2];
  int         exp_stage = CAL_FIRST;
  logic       exp_q = 1'b0;
  int         done_cycle = -1;

  initial begin
    #200_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (!ph) cycle++;
    ds_valid <= 1'b0;
    if (cal_shift) begin
      check(!ph, "instant on a phase-1 edge");
      check(pend < 0, "no instant while a measurement is pending");
      if (last_instant >= 0)
        check((exp_stage == CAL_FIRST && !exp_q) ? cycle - last_instant >= CAL_INTERVAL
                                                 : cycle - last_instant == CAL_INTERVAL,
              $sformatf("instants %0d cycles apart", cycle - last_instant));
      if (first_instant < 0) first_instant = cycle;
      check(int'(cal_stage) == exp_stage && force_q == exp_q,
            $sformatf("instant for stage %0d q=%0b, expected %0d q=%0b",
                      cal_stage, force_q, exp_stage, exp_q));
      last_instant = cycle;
      n_inst++;
      pend       = cycle + 9;
      pend_stage = cal_stage;
      pend_q     = force_q;
    end
    if (pend >= 0) begin
      check(cal_stage == pend_stage && force_q == pend_q, "stage and decision held");
      if (!ph && cycle == pend) begin
        ds       <= meas[pend_stage][pend_q];
        ds_valid <= 1'b1;
        pend     = -1;
        if (exp_q) begin exp_q = 1'b0; exp_stage--; end
        else       exp_q = 1'b1;
      end
    end
    if (we) begin
      n_wr++;
      check(int'(widx) == CAL_FIRST + 1 - n_wr, $sformatf("write to stage %0d", widx));
      if (widx >= 1 && widx <= CAL_FIRST)
        check(wdata == ((meas[widx][0] > meas[widx][1]) ? meas[widx][0] - meas[widx][1] : '0),
              $sformatf("weight %0d = %0d", widx, wdata));
    end
  end

  initial begin
    for (int k = 1; k <= CAL_FIRST; k++) begin
      meas[k][0] = weight_t'($urandom_range(100000, 3000000));
      meas[k][1] = (k == 3) ? meas[k][0] + 5 : weight_t'($urandom_range(0, 99999));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(!busy && !cal_done && !cal_shift, "idle after reset");
    cal_start = 1'b1; @(negedge clk); cal_start = 1'b0;
    check(busy, "busy after start");
    wait (cal_done);
    @(negedge clk iff ph);          // sample cycle in which cal_done is seen
    done_cycle = cycle;
    check(n_inst == 2 * CAL_FIRST, $sformatf("%0d instants", n_inst));
    check(n_wr == CAL_FIRST, $sformatf("%0d writes", n_wr));
    check(done_cycle - first_instant == 154,
          $sformatf("run took %0d cycles", done_cycle - first_instant));
    check(!busy, "idle after the run");
    // Second run straight away: spacing to the previous instant is kept.
    exp_stage = CAL_FIRST; exp_q = 1'b0; n_wr = 0;
    cal_start = 1'b1; @(negedge clk); cal_start = 1'b0;
    check(!cal_done, "cal_done cleared by a new start");
    wait (cal_done);
    @(negedge clk);
    check(n_inst == 4 * CAL_FIRST, $sformatf("%0d instants after two runs", n_inst));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
