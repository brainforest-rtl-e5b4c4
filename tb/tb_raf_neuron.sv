// tb_raf_neuron: configures one neuron through its scan segment (channel,
// shifts, thresholds), feeds eight different noisy tones and checks fire and
// magnitude against the reference on the selected channel only.
module tb_raf_neuron;
  import bf_ref_pkg::*;
  import bf_pkg::raf_cfg_t;
  logic clk = 0, rst_n = 1, sample_en = 0, cfg_en = 0, cfg_si = 0, cfg_so, fire;
  logic [7:0][15:0] samples = '0;
  logic [15:0] mag;
  int checks = 0, failures = 0, fires = 0;
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

  initial begin
    #1 rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int cfg = 0; cfg < 6; cfg++) begin
      #1 rst_n = 0; @(posedge clk); #1 rst_n = 1;
      c.ch_sel = 3'($urandom_range(0, 7));
      c.lam1   = 4'($urandom_range(2, 6));
      c.lam2   = 4'($urandom_range(0, 3));
      c.a_hyst = 16'($urandom_range(0, 300));
      c.d_th   = 16'($urandom_range(1, 12));
      cfg_en = 1;
      for (int b = 0; b < $bits(raf_cfg_t); b++) begin
        cfg_si = c[b];
        @(posedge clk); #1;
      end
      cfg_en = 0;
      checks++;
      if (dut.cfg_q != c) begin failures++; $display("scan load failed"); end
      raf_reset(r);
      for (int n = 0; n < 300; n++) begin
        for (int ch = 0; ch < 8; ch++)
          samples[ch] = 16'(sat16(longint'((2000.0 + 1500.0 * ch) * $sin(6.2831853 * n / (5.0 + 3.0 * ch)))
                                  + longint'($urandom_range(0, 200)) - 100));
        raf_step(r, longint'($signed(samples[c.ch_sel])), int'(c.lam1), int'(c.lam2),
                 longint'(c.a_hyst), longint'(c.d_th));
        sample_en = 1; @(posedge clk); #1; sample_en = 0;
        @(posedge clk); #1;
        checks++;
        if (fire != r.fire || longint'(mag) != r.mag) begin
          failures++;
          if (failures < 10) $display("mismatch n=%0d fire=%0b/%0b mag=%0d/%0d", n, fire, r.fire, mag, r.mag);
        end
        fires += r.fire;
        repeat ($urandom_range(0, 2)) @(posedge clk);
        #1;
      end
    end
    checks++; if (fires == 0) begin failures++; $display("never fired"); end
    $display("fires=%0d", fires);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
