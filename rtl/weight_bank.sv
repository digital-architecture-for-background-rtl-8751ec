// weight_bank: the programmable stage weights w_1 .. w_18 of the output
// code D = sum q_i * w_i.
//
// After reset every weight holds its nominal value G**(16 - i) output LSBs
// (G = 1.81), i.e. the gain products of the uncalibrated encoder; weights
// 17 and 18 (G**-1, G**-2) serve only the calibration measurement. The
// calibration logic overwrites a weight through the single write port; all
// weights are read in parallel. Weights are registers of WEIGHT_W bits with
// WEIGHT_FRAC fractional bits (own choice; the document gives no width).
//
// Timing: a write takes effect on the next clock edge.
module weight_bank
  import adc_cal_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  stage_idx_t widx,          // 1..N_TOTAL
  input  weight_t    wdata,
  output weight_t    w [1:N_TOTAL]
);

  for (genvar i = 1; i <= N_TOTAL; i++) begin : g_w
    localparam weight_t W_NOM = nominal_weight(i);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        w[i] <= W_NOM;
      end else if (we && widx == stage_idx_t'(i)) begin
        w[i] <= wdata;
      end
    end
  end

endmodule
