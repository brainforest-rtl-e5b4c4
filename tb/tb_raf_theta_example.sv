// tb_raf_theta_example: one RAF neuron tuned to the theta band (4-8 Hz) at
// 256 samples/s, driven with four seconds of a 5 Hz wave whose amplitude
// falls to a third and rises again. The neuron must fire about once per
// wave period, its magnitude must follow the envelope (a constant ratio
// within +-25 %), and every output must match the reference model. The
// same neuron then gets a 40 Hz (gamma) wave of equal amplitude and must
// stay silent: the duration threshold removes it entirely.
module tb_raf_theta_example;
  import bf_ref_pkg::*;
  import bf_pkg::raf_cfg_t;
  localparam real FS = 256.0;
  logic clk = 0, rst_n = 1, sample_en = 0, cfg_en = 0, cfg_si = 0, cfg_so, fire;
  logic [7:0][15:0] samples = '0;
  logic [15:0] mag;
  int checks = 0, failures = 0;
  raf_state_t r;
  raf_cfg_t c;

  raf_neuron dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real f, input int ns, output int fires, output real rmin, output real rmax);
    fires = 0; rmin = 1.0e9; rmax = 0.0;
    for (int n = 0; n < ns; n++) begin
      real t, env;
      t = n / FS;
      env = (t < 2.0) ? 1.0 - t / 3.0 : 1.0 / 3.0 + (t - 2.0) / 3.0;
      samples[3] = 16'(sat16(longint'(12000.0 * env * $cos(6.2831853 * f * t))));
      raf_step(r, longint'($signed(samples[3])), int'(c.lam1), int'(c.lam2), longint'(c.a_hyst), longint'(c.d_th));
      sample_en = 1; @(posedge clk); #1; sample_en = 0;
      @(posedge clk); #1;
      checks++;
      if (fire != r.fire || longint'(mag) != r.mag) failures++;
      if (fire && n > 64) begin   // after the filter has settled
        real ratio;
        ratio = real'(mag) / (12000.0 * env);
        if (ratio < rmin) rmin = ratio;
        if (ratio > rmax) rmax = ratio;
      end
      fires += fire;
    end
  endtask

  initial begin
    int fires;
    real rmin, rmax;
    #1 rst_n = 0; @(posedge clk); #1 rst_n = 1;
    c.ch_sel = 3'd3;
    c.lam1   = 4'd6;    // high-pass corner about 0.6 Hz
    c.lam2   = 4'd2;    // low-pass corner about 10 Hz
    c.a_hyst = 16'd300;
    c.d_th   = 16'd16;  // trough to peak of an 8 Hz wave
    cfg_en = 1;
    for (int b = 0; b < $bits(raf_cfg_t); b++) begin cfg_si = c[b]; @(posedge clk); #1; end
    cfg_en = 0;
    raf_reset(r);
    run(5.0, 1024, fires, rmin, rmax);
    $display("theta: fires=%0d magnitude/envelope ratio %f .. %f", fires, rmin, rmax);
    checks++; if (fires < 18 || fires > 21) failures++;
    checks++; if (rmax > 1.25 * rmin || rmin <= 0.0) failures++;
    #1 rst_n = 0; @(posedge clk); #1 rst_n = 1;
    cfg_en = 1;
    for (int b = 0; b < $bits(raf_cfg_t); b++) begin cfg_si = c[b]; @(posedge clk); #1; end
    cfg_en = 0;
    raf_reset(r);
    run(40.0, 1024, fires, rmin, rmax);
    $display("gamma: fires=%0d", fires);
    checks++; if (fires != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
