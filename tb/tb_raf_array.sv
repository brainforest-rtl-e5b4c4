// tb_raf_array: all 32 neurons configured through the scan chain (neuron 0
// shifted first) on eight noisy tones; every sample checks each neuron's
// fire flag and magnitude, and each magnitude read back bit-serially.
module tb_raf_array;
  import bf_ref_pkg::*;
  import bf_pkg::raf_cfg_t;
  localparam int NR = 32;
  logic clk = 0, rst_n = 1, sample_en = 0, cfg_en = 0, cfg_si = 0, cfg_so;
  logic [7:0][15:0] samples = '0;
  logic [5:0] bit_idx = 0;
  logic [NR-1:0] fire, x_ser;
  logic [NR-1:0][15:0] mag;
  int checks = 0, failures = 0, fires = 0;
  raf_state_t r[NR];
  raf_cfg_t c[NR];

  raf_array dut (.*);
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
    for (int i = 0; i < NR; i++) begin
      c[i].ch_sel = 3'(i % 8);
      c[i].lam1   = 4'($urandom_range(2, 6));
      c[i].lam2   = 4'($urandom_range(0, 3));
      c[i].a_hyst = 16'($urandom_range(0, 300));
      c[i].d_th   = 16'($urandom_range(1, 12));
      raf_reset(r[i]);
    end
    cfg_en = 1;
    for (int i = 0; i < NR; i++)
      for (int b = 0; b < $bits(raf_cfg_t); b++) begin
        cfg_si = c[i][b];
        @(posedge clk); #1;
      end
    cfg_en = 0;
    for (int n = 0; n < 200; n++) begin
      for (int ch = 0; ch < 8; ch++)
        samples[ch] = 16'(sat16(longint'((2000.0 + 1500.0 * ch) * $sin(6.2831853 * n / (5.0 + 3.0 * ch)))
                                + longint'($urandom_range(0, 200)) - 100));
      for (int i = 0; i < NR; i++)
        raf_step(r[i], longint'($signed(samples[c[i].ch_sel])), int'(c[i].lam1), int'(c[i].lam2),
                 longint'(c[i].a_hyst), longint'(c[i].d_th));
      sample_en = 1; @(posedge clk); #1; sample_en = 0;
      @(posedge clk); #1;
      for (int i = 0; i < NR; i++) begin
        checks++;
        if (fire[i] != r[i].fire || longint'(mag[i]) != r[i].mag) begin
          failures++;
          if (failures < 10) $display("mismatch n=%0d i=%0d fire=%0b/%0b mag=%0d/%0d", n, i, fire[i], r[i].fire, mag[i], r[i].mag);
        end
        fires += r[i].fire;
      end
      for (int b = 0; b < 32; b++) begin
        bit_idx = 6'(b); #1;
        for (int i = 0; i < NR; i++) begin
          checks++;
          if (x_ser[i] != ((b < 16) ? r[i].mag[b] : 1'b0)) failures++;
        end
      end
    end
    checks++; if (fires == 0) begin failures++; $display("never fired"); end
    $display("fires=%0d", fires);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
