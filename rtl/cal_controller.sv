// cal_controller: sequences the background calibration.
//
// Stages are calibrated from the least significant calibrated stage
// (CAL_FIRST = 7) toward stage 1, because the measurement of stage k is
// made by the stages after it with their already corrected weights. Each
// stage takes two calibration instants: one with its decision forced to 0
// and one with it forced to 1, its input grounded both times. The encoder
// returns the codes D_S1 and D_S2 of the two residues, and the new weight
// is w_k = D_S1 - D_S2 (clipped at zero), the point where both segments of
// the stage's transfer give the same output.
//
// A calibration instant (`cal_shift`) is issued on a phase-1 edge, at most
// one every CAL_INTERVAL = 11 sample cycles, so that the samples moved by
// one instant and the calibration sample have left the pipeline before the
// next. A run is 14 such slots: the calibration of 7 stages takes 154
// sample cycles from the first instant to `cal_done` (the first instant
// comes on the first phase-1 edge after `cal_start`). The run stays busy to
// the end of its last slot, so that back-to-back runs keep the spacing. The order, the forcing and the weight rule follow the
// document; the spacing is this design's reading of its 154-cycle figure.
//
// Interface: `cal_start` (one clock pulse) starts a run when idle; `busy`
// is high during the run; `cal_done` rises when the last weight is
// written and stays high until the next start. `cal_stage` and `force_q`
// are held stable while a calibration sample is in flight.
module cal_controller
  import adc_cal_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ph,          // 0: phase-1 edge, 1: phase-2 edge
  input  logic       cal_start,
  input  weight_t    ds,          // calibration measurement from the encoder
  input  logic       ds_valid,
  output logic       cal_shift,   // calibration instant
  output stage_idx_t cal_stage,   // stage under calibration
  output logic       force_q,     // decision forced on it
  output logic       we,          // weight write
  output stage_idx_t widx,
  output weight_t    wdata,
  output logic       busy,
  output logic       cal_done
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_END} state_e;

  state_e  state;
  logic [$clog2(CAL_INTERVAL+1)-1:0] gap;   // sample cycles until next instant
  weight_t ds1;                             // D_S1 of the current stage

  assign cal_shift = (state == S_ISSUE) && !ph && (gap == '0);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      gap       <= '0;
      cal_stage <= stage_idx_t'(CAL_FIRST);
      force_q   <= 1'b0;
      ds1       <= '0;
      we        <= 1'b0;
      widx      <= '0;
      wdata     <= '0;
      cal_done  <= 1'b0;
    end else begin
      we <= 1'b0;
      if (!ph && gap != '0) gap <= gap - 1'b1;
      unique case (state)
        S_IDLE: begin
          if (cal_start) begin
            state     <= S_ISSUE;
            gap       <= '0;
            cal_stage <= stage_idx_t'(CAL_FIRST);
            force_q   <= 1'b0;
            cal_done  <= 1'b0;
          end
        end
        S_ISSUE: begin
          if (cal_shift) begin
            state <= S_WAIT;
            gap   <= ($bits(gap))'(CAL_INTERVAL - 1);
          end
        end
        S_WAIT: begin
          if (ds_valid) begin
            if (!force_q) begin
              ds1     <= ds;
              force_q <= 1'b1;
              state   <= S_ISSUE;
            end else begin
              we    <= 1'b1;
              widx  <= cal_stage;
              wdata <= (ds1 > ds) ? ds1 - ds : '0;
              if (cal_stage == stage_idx_t'(1)) begin
                state <= S_END;
              end else begin
                cal_stage <= cal_stage - 1'b1;
                force_q   <= 1'b0;
                state     <= S_ISSUE;
              end
            end
          end
        end
        S_END: begin
          // Hold the last slot to its end so that a following run keeps
          // the spacing between instants.
          if (gap == '0) begin
            state    <= S_IDLE;
            cal_done <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
