// tb_weight_bank: checks the reset weights against G**(16 - i) * 2**8
// evaluated in real arithmetic (G = 1.81 as held in 16 fractional bits,
// to within one weight unit),
// then random writes and read-back of all 18 weights.
`timescale 1ns/1ps
module tb_weight_bank;
  import adc_cal_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  stage_idx_t widx = '0;
  weight_t    wdata = '0;
  weight_t    w [1:N_TOTAL];

  weight_bank dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  weight_t model [1:N_TOTAL];

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
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 1; i <= N_TOTAL; i++) begin
      real e, d;
      e = ((real'(GAIN_NOM) / 65536.0) ** (16 - i)) * 256.0;
      d = real'(w[i]) - e;
      check(d <= 1.0 && d >= -1.0, $sformatf("nominal w%0d=%0d expected %f", i, w[i], e));
      model[i] = w[i];
    end
    check(w[16] == weight_t'(256), "stage 16 weight is one LSB");
    for (int n = 0; n < 200; n++) begin
      we    = $urandom_range(0, 3) != 0;
      widx  = stage_idx_t'($urandom_range(0, N_TOTAL + 1));
      wdata = weight_t'($urandom);
      @(negedge clk);
      if (we && widx >= 1 && widx <= N_TOTAL) model[widx] = wdata;
      for (int i = 1; i <= N_TOTAL; i++)
        check(w[i] == model[i], $sformatf("w%0d=%0d expected %0d", i, w[i], model[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
