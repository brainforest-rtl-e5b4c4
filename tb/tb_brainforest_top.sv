// tb_brainforest_top: end-to-end run of the full-size processor (32
// neurons, 128 tiles, 1024 trees, default parameters).
//
// The whole model is shifted in over the scan chain: neuron i listens to
// channel i mod 8; tiles 4i..4i+3 integrate neuron i with decay shifts
// 1, 3, 5, 8; comparison points are random; weights decay with lam = 7 from
// 30000; the accumulator preload is minus half the weight sum. Eight noisy
// tones whose amplitude rises and falls like the envelope of an episode
// are sampled one set at a time. An integer model of the whole chain
// predicts for every sample whether anything fires, and if so the class;
// the testbench checks class, trigger and the 1060-cycle latency, and
// counts each mechanism: idle samples, gated tiles, tree votes of both
// kinds, gated and active accumulator cycles, both classes, triggers.
module tb_brainforest_top;
  import bf_ref_pkg::*;
  import bf_pkg::*;
  localparam int NS = 160;
  localparam int LAT = 3 + SER_LEN + N_TREES;

  logic clk = 0, rst_n = 1, adc_valid = 0, cfg_en = 0, cfg_si = 0, cfg_so, busy;
  logic [N_CH-1:0][SAMPLE_W-1:0] adc_data = '0;
  logic [N_RAF-1:0] raf_fire;
  logic class_out, class_valid, stim_trigger, acc_adding;
  logic signed [ACC_W-1:0] class_acc;
  logic [$clog2(N_TILES+1)-1:0] tiles_active;

  brainforest_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_idle = 0, n_event = 0, n_gated_tiles = 0, n_tile_upd = 0, n_vote1 = 0, n_vote0 = 0;
  int n_add = 0, n_noadd = 0, n_pos = 0, n_neg = 0, n_trig = 0;

  raf_state_t r[N_RAF];
  raf_cfg_t   rc[N_RAF];
  int         sel[N_TILES], alp[N_TILES];
  longint     cp[N_TILES][TREES_PER_TILE], ys[N_TILES];
  bit         pol[N_TILES][TREES_PER_TILE], dv[N_TILES][TREES_PER_TILE];
  longint     wt[N_TREES];
  longint     preload;
  bit         q[$];

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(longint v, int w);
    for (int b = 0; b < w; b++) q.push_back(v[b]);
  endtask

  // counters of activity inside the processing of one sample
  always @(posedge clk) if (rst_n) begin
    if (dut.serial_go && dut.bit_idx == '0) begin
      n_tile_upd    += int'(tiles_active);
      n_gated_tiles += N_TILES - int'(tiles_active);
    end
    if (dut.rot_en) begin
      if (acc_adding) n_add++; else n_noadd++;
    end
  end

  initial begin
    longint wsum, w;
    #1 rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;

    // ---- model ----
    for (int i = 0; i < N_RAF; i++) begin
      rc[i].ch_sel = CH_SEL_W'(i % N_CH);
      rc[i].lam1   = LAM_W'(2 + (i / 8));
      rc[i].lam2   = LAM_W'(i % 3);
      rc[i].a_hyst = 16'($urandom_range(20, 200));
      rc[i].d_th   = 16'($urandom_range(2, 4));
      raf_reset(r[i]);
    end
    for (int t = 0; t < N_TILES; t++) begin
      automatic int al[4] = '{1, 3, 5, 8};
      sel[t] = (t / 4) % N_RAF;
      alp[t] = al[t % 4];
      ys[t]  = 0;
      for (int j = 0; j < TREES_PER_TILE; j++) begin
        cp[t][j]  = longint'($urandom_range(0, 9000));
        pol[t][j] = ($urandom_range(0, 9) == 0);
        dv[t][j]  = 0;  // decision registers reset to 0
      end
    end
    w = 30000 * 256; wsum = 0;
    for (int m = 0; m < N_TREES; m++) begin wt[m] = w >> 8; wsum += wt[m]; w = w - (w >> 7); end
    preload = -(wsum * 3 / 10);

    // ---- scan chain: neurons, tiles, weight generator, preload, enable ----
    for (int i = 0; i < N_RAF; i++) push(longint'(rc[i]), $bits(raf_cfg_t));
    for (int t = 0; t < N_TILES; t++) begin
      push(longint'(sel[t]), RAF_SEL_W); push(longint'(alp[t]), ALPHA_W);
      for (int j = 0; j < TREES_PER_TILE; j++) begin push(cp[t][j], DATA_W); push(longint'(pol[t][j]), 1); end
    end
    push(30000, 16); push(7, 4);
    push(preload, ACC_W);
    push(1, 1);
    checks++;
    if (q.size() != N_RAF * $bits(raf_cfg_t) + N_TILES * (10 + TREES_PER_TILE * 17) + 49) failures++;
    cfg_en = 1;
    foreach (q[k]) begin cfg_si = q[k]; @(posedge clk); #1; end
    cfg_en = 0;

    // ---- samples ----
    for (int n = 0; n < NS; n++) begin
      real env;
      bit anyf;
      longint acc;
      int cyc;
      env = (n < NS / 2) ? 0.05 + 1.9 * n / NS : 0.05 + 1.9 * (NS - n) / NS;
      for (int ch = 0; ch < N_CH; ch++)
        adc_data[ch] = 16'(sat16(longint'(env * (6000.0 + 1000.0 * ch) * $sin(6.2831853 * n / (4.0 + 2.0 * ch)))
                                 + longint'($urandom_range(0, 300)) - 150));
      anyf = 0;
      for (int i = 0; i < N_RAF; i++) begin
        raf_step(r[i], longint'($signed(adc_data[rc[i].ch_sel])), int'(rc[i].lam1), int'(rc[i].lam2),
                 longint'(rc[i].a_hyst), longint'(rc[i].d_th));
        anyf |= r[i].fire;
      end
      acc = preload;
      if (anyf) begin
        for (int t = 0; t < N_TILES; t++)
          if (r[sel[t]].fire) begin
            ys[t] = edm_step(ys[t], r[sel[t]].mag, alp[t]);
            for (int j = 0; j < TREES_PER_TILE; j++) dv[t][j] = tree_vote(ys[t], alp[t], cp[t][j], pol[t][j]);
          end
        for (int m = 0; m < N_TREES; m++) begin
          if (dv[m / TREES_PER_TILE][m % TREES_PER_TILE]) begin acc += wt[m]; n_vote1++; end
          else n_vote0++;
        end
      end
      adc_valid = 1; @(posedge clk); #1; adc_valid = 0;
      cyc = 1;
      while (busy && !class_valid && cyc < 5000) begin @(posedge clk); #1; cyc++; end
      if (!anyf) begin
        n_idle++;
        checks++;
        if (busy || class_valid || cyc != 3) begin failures++; $display("n=%0d: expected idle return, cyc=%0d", n, cyc); end
      end else begin
        n_event++;
        while (!class_valid && cyc < 5000) begin @(posedge clk); #1; cyc++; end
        checks++;
        if (cyc != LAT + 1 || class_out != (acc > 0) || longint'(class_acc) != acc) begin
          failures++;
          $display("n=%0d: class=%0b ref=%0b (acc %0d) latency=%0d", n, class_out, acc > 0, acc, cyc);
        end
        if (acc > 0) n_pos++; else n_neg++;
        if (n % 20 == 0) $display("n=%0d acc=%0d", n, acc);
        @(posedge clk); #1;
        checks++;
        if (stim_trigger != (acc > 0)) failures++;
        n_trig += stim_trigger;
      end
      checks++;
      if (raf_fire != '0 && !anyf) failures++;
      while (busy) @(posedge clk);
      #1;
    end

    $display("samples=%0d idle=%0d events=%0d tile_updates=%0d gated_tiles=%0d votes1=%0d votes0=%0d adds=%0d gated_adds=%0d pos=%0d neg=%0d triggers=%0d",
             NS, n_idle, n_event, n_tile_upd, n_gated_tiles, n_vote1, n_vote0, n_add, n_noadd, n_pos, n_neg, n_trig);
    checks++; if (n_idle == 0)        begin failures++; $display("no idle sample"); end
    checks++; if (n_event == 0)       begin failures++; $display("no event"); end
    checks++; if (n_gated_tiles == 0) begin failures++; $display("no gated tile"); end
    checks++; if (n_tile_upd == 0)    begin failures++; $display("no tile update"); end
    checks++; if (n_vote1 == 0 || n_vote0 == 0) begin failures++; $display("votes of one kind only"); end
    checks++; if (n_add == 0 || n_noadd == 0)   begin failures++; $display("accumulator gating not seen"); end
    checks++; if (n_pos == 0 || n_neg == 0)     begin failures++; $display("one class only"); end
    checks++; if (n_trig == 0)        begin failures++; $display("no trigger"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
