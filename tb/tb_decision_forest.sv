// tb_decision_forest: a small forest (4 tiles of 3 trees) with random tile
// bindings, decay shifts and comparison points loaded over the scan chain.
// Random fire patterns and serial magnitudes drive the tiles; after each
// serial pass the full decision stream is read out (tree 0 of tile 0
// first) and compared with the integer reference, tiles whose neuron did
// not fire must keep their old decisions, and after one full turn the
// stream must repeat itself (the chain is circular).
module tb_decision_forest;
  import bf_ref_pkg::*;
  localparam int NT = 4, J = 3, NR = 32;
  logic clk = 0, rst_n = 1, serial_go = 0, rot_en = 0, cfg_en = 0, cfg_si = 0, cfg_so, dec_stream;
  logic [NR-1:0] fire = '0, x_ser = '0;
  logic [5:0] bit_idx = 0;
  logic [$clog2(NT+1)-1:0] n_active;
  int checks = 0, failures = 0, gated = 0, updated = 0, ones = 0, zeros = 0;
  int sel[NT], alp[NT];
  longint cp[NT][J], y[NT];
  bit pol[NT][J], dref[NT][J];
  longint mag[NR];

  decision_forest #(.N_TILES(NT), .TREES_PER_TILE(J)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic shift_bit(bit b);
    cfg_si = b; @(posedge clk); #1;
  endtask

  initial begin
    #1 rst_n = 0; @(posedge clk); #1 rst_n = 1;
    cfg_en = 1;
    for (int t = 0; t < NT; t++) begin
      sel[t] = (t == 0) ? 31 : $urandom_range(0, 3);
      alp[t] = (t == 1) ? 16 : $urandom_range(0, 12);
      y[t] = 0;
      for (int b = 0; b < 5; b++) shift_bit(sel[t][b]);
      for (int b = 0; b < 5; b++) shift_bit(alp[t][b]);
      for (int j = 0; j < J; j++) begin
        cp[t][j] = $urandom_range(0, 30000);
        pol[t][j] = ($urandom_range(0, 3) == 0);
        dref[t][j] = 0;
        for (int b = 0; b < 16; b++) shift_bit(cp[t][j][b]);
        shift_bit(pol[t][j]);
      end
    end
    cfg_en = 0;
    for (int ev = 0; ev < 150; ev++) begin
      int na;
      na = 0;
      for (int i = 0; i < NR; i++) begin
        fire[i] = ($urandom_range(0, 2) == 0);
        mag[i] = $urandom_range(0, 40000);
      end
      for (int t = 0; t < NT; t++)
        if (fire[sel[t]]) begin
          na++;
          y[t] = edm_step(y[t], mag[sel[t]], alp[t]);
          for (int j = 0; j < J; j++) dref[t][j] = tree_vote(y[t], alp[t], cp[t][j], pol[t][j]);
          updated++;
        end else gated++;
      serial_go = 1;
      for (int b = 0; b < 32; b++) begin
        bit_idx = 6'(b);
        for (int i = 0; i < NR; i++) x_ser[i] = (b < 16) ? mag[i][b] : 1'b0;
        #1;
        if (b == 0) begin checks++; if (int'(n_active) != na) begin failures++; if (failures < 5) $display("n_active=%0d exp=%0d", n_active, na); end end
        @(posedge clk); #1;
      end
      serial_go = 0;
      for (int pass = 0; pass < 2; pass++)
        for (int m = 0; m < NT * J; m++) begin
          checks++;
          if (dec_stream != dref[m / J][m % J]) begin
            failures++;
            if (failures < 10) $display("ev=%0d pass=%0d m=%0d got=%0b exp=%0b", ev, pass, m, dec_stream, dref[m / J][m % J]);
          end
          if (dref[m / J][m % J]) ones++; else zeros++;
          rot_en = 1; @(posedge clk); #1; rot_en = 0;
        end
    end
    checks++; if (gated == 0 || updated == 0 || ones == 0 || zeros == 0) failures++;
    $display("updated=%0d gated=%0d ones=%0d zeros=%0d", updated, gated, ones, zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
