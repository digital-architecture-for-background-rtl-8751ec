// tb_digital_encoder: drives the encoder with decisions taken from a
// sample-tracking model of the pipeline written from the sample table of
// the design (stage 1 takes a new sample on every phase-1 edge, even
// stages take from the stage before on phase-2 edges; at a calibration
// instant stage 1 takes the calibration sample, stage 3 the new input
// sample and odd stage p the sample of stage p-3). Every sample gets
// random decision bits per logical position; weights are random.
// Checks: each output code equals the rounded, clipped sum of its bits
// times the weights of logical positions 1..16, in order, 8 cycles after
// the sample was taken, with no gaps; dout_shifted marks moved samples;
// stage_en keeps the extra stages idle except for moved and calibration
// samples; force_zero is raised exactly for the stage under calibration on the edge
// where the calibration sample reaches it; and ds equals the sum over the
// positions after that stage down to 18.
`timescale 1ns/1ps
module tb_digital_encoder;
  import adc_cal_pkg::*;

  logic                clk = 1'b0, rst_n = 1'b0, ph = 1'b0, cal_shift = 1'b0;
  stage_idx_t          cal_stage = stage_idx_t'(5);
  logic [N_TOTAL:1]    q = '0;
  weight_t             w [1:N_TOTAL];
  logic [N_TOTAL:1]    force_zero;
  logic [N_TOTAL:1]    stage_en = '1;   // bits 1..16 stay 1, 17..18 from the DUT
  logic [OUT_BITS-1:0] dout;
  logic                dout_valid, dout_shifted;
  weight_t             ds;
  logic                ds_valid;

  digital_encoder dut (.*, .extra_en(stage_en[N_TOTAL:N_STAGES+1]));

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

  // Sample bookkeeping. Id 0 means empty.
  localparam int MAXS = 4096;
  logic [N_TOTAL:1] bits [MAXS];
  bit               is_cal [MAXS];
  bit               moved  [MAXS];
  int               t_in   [MAXS];
  int               cal_k  [MAXS];
  int id  [1:N_TOTAL];
  int pos [1:N_TOTAL];
  int next_id = 1, cycle = 0;
  int out_q[$];
  int n_out = 0, n_moved = 0, n_ds = 0, n_force = 0, gaps = 0, n_idle = 0;
  bit filled = 0;

  function automatic longint unsigned code_of(int s);
    longint unsigned sum = 0;
    for (int j = 1; j <= N_STAGES; j++) if (bits[s][j]) sum += longint'(w[j]);
    sum = (sum + (1 << (WEIGHT_FRAC - 1))) >> WEIGHT_FRAC;
    return (sum > (1 << OUT_BITS) - 1) ? (1 << OUT_BITS) - 1 : sum;
  endfunction

  function automatic longint unsigned ds_of(int s);
    longint unsigned sum = 0;
    for (int j = cal_k[s] + 1; j <= N_TOTAL; j++) if (bits[s][j]) sum += longint'(w[j]);
    return sum;
  endfunction

  function automatic int new_sample(bit cal);
    int s = next_id;
    next_id++;
    bits[s]   = N_TOTAL'({$urandom, $urandom});
    is_cal[s] = cal;
    moved[s]  = 1'b0;
    t_in[s]   = cycle;
    cal_k[s]  = int'(cal_stage);
    if (!cal) out_q.push_back(s);
    return s;
  endfunction

  // Expected force vector for the coming edge.
  function automatic logic [N_TOTAL:1] exp_force();
    logic [N_TOTAL:1] f = '0;
    int k = int'(cal_stage);
    if (k % 2 == 1 && !ph) begin
      if (k == 1) f[k] = cal_shift;
      else if (!(cal_shift && k >= 3)) f[k] = (id[k-1] != 0 && is_cal[id[k-1]]);
      else if (k >= 5) f[k] = (id[k-3] != 0 && is_cal[id[k-3]]);
    end
    if (k % 2 == 0 && ph) f[k] = (id[k-1] != 0 && is_cal[id[k-1]]);
    return f;
  endfunction

  // Expected stage enables for the coming edge: the extra stages only for
  // a sample that still needs a stage (moved, unfinished) or the
  // calibration sample.
  function automatic logic [N_TOTAL:1] exp_en();
    logic [N_TOTAL:1] e = '1;
    for (int p = N_STAGES + 1; p <= N_TOTAL; p++) begin
      int  src, sp;
      bit  odd_edge;
      odd_edge = (p % 2 == 1);
      if (odd_edge && cal_shift && !ph) begin src = id[p-3]; sp = pos[p-3]; end
      else begin src = id[p-1]; sp = pos[p-1]; end
      e[p] = src != 0 && (is_cal[src] || sp < N_STAGES);
    end
    return e;
  endfunction

  // Model update on each edge, from the values before the edge.
  always @(posedge clk) if (rst_n) begin
    int oid [1:N_TOTAL];
    int opos[1:N_TOTAL];
    check(force_zero == exp_force(), $sformatf("force_zero %b expected %b", force_zero, exp_force()));
    if (force_zero != '0) n_force++;
    begin
      logic [N_TOTAL:1] ee, mask;
      ee = exp_en();
      // only the stages whose edge this is are compared
      mask = '0;
      for (int p = 1; p <= N_TOTAL; p++) mask[p] = ((p % 2 == 1) == !ph);
      check((stage_en & mask) == (ee & mask), $sformatf("stage_en %b expected %b", stage_en & mask, ee & mask));
      if ((mask[N_TOTAL] && !stage_en[N_TOTAL]) || (mask[N_TOTAL-1] && !stage_en[N_TOTAL-1])) n_idle++;
    end
    oid = id; opos = pos;
    if (!ph) begin
      cycle++;
      for (int p = 1; p <= N_TOTAL; p += 2) begin
        if (p == 1) begin
          id[1] = new_sample(cal_shift); pos[1] = 1;
        end else if (cal_shift && p == 3) begin
          id[3] = new_sample(1'b0); pos[3] = 1; moved[id[3]] = 1'b1;
        end else if (cal_shift && p >= 5) begin
          id[p] = oid[p-3]; pos[p] = opos[p-3] + 1;
          if (id[p] != 0) moved[id[p]] = 1'b1;
        end else begin
          id[p] = oid[p-1]; pos[p] = opos[p-1] + 1;
        end
      end
    end else begin
      for (int p = 2; p <= N_TOTAL; p += 2) begin
        id[p] = oid[p-1]; pos[p] = opos[p-1] + 1;
      end
    end
    // Finished samples leave the model.
    for (int p = 1; p <= N_TOTAL; p++)
      if (id[p] != 0 && !is_cal[id[p]] && pos[p] > N_STAGES) id[p] = 0;
  end

  // Drive decisions of the held samples; check outputs.
  always @(negedge clk) if (rst_n) begin
    for (int p = 1; p <= N_TOTAL; p++)
      q[p] = (id[p] != 0 && pos[p] >= 1 && pos[p] <= N_TOTAL) ? bits[id[p]][pos[p]] : 1'($urandom);
    if (ph && filled && !dout_valid) gaps++;
    if (dout_valid) begin
      int s;
      filled = 1'b1;
      s = out_q.pop_front();
      n_out++;
      if (moved[s]) n_moved++;
      check(64'(dout) == code_of(s), $sformatf("sample %0d code %0d expected %0d", s, dout, code_of(s)));
      check(dout_shifted == moved[s], "dout_shifted flag");
      check(cycle - t_in[s] == 8, $sformatf("latency %0d", cycle - t_in[s]));
    end
    if (ds_valid) begin
      n_ds++;
      check(64'(ds) == ds_of(next_id_cal), $sformatf("ds %0d expected %0d", ds, ds_of(next_id_cal)));
    end
  end

  int next_id_cal;   // id of the calibration sample in flight

  initial begin
    for (int j = 1; j <= N_TOTAL; j++)
      w[j] = weight_t'(int'(real'(nominal_weight(j)) * (0.9 + 0.2 * $urandom_range(0, 1000) / 1000.0)));
    for (int p = 1; p <= N_TOTAL; p++) begin id[p] = 0; pos[p] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      forever @(posedge clk) ph <= !ph;
    join_none
    for (int r = 0; r < 40; r++) begin
      // wait a random number of cycles (at least 11), then one instant
      repeat (2 * (CAL_INTERVAL + $urandom_range(0, 5))) @(negedge clk);
      if (ph) @(negedge clk);                // now in a phase-1 period
      cal_stage   = stage_idx_t'((r < 14) ? (r % 7) + 1 : $urandom_range(1, N_STAGES));
      cal_shift   = 1'b1;
      next_id_cal = next_id;
      @(negedge clk);
      cal_shift   = 1'b0;
    end
    repeat (40) @(negedge clk);
    $display("outputs=%0d moved=%0d measurements=%0d forced=%0d", n_out, n_moved, n_ds, n_force);
    check(n_ds == 40 && n_force == 40, "every instant measured and forced once");
    check(n_moved > 0, "moved samples seen");
    check(n_idle > 0, "extra stages kept idle");
    check(gaps == 0, $sformatf("%0d missing output codes", gaps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
