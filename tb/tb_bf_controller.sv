// tb_bf_controller: samples with and without neuron activity. Without a
// firing the controller must return to idle after the fire check with no
// serial or stream cycles; with one it must run exactly SERIAL_CYCLES
// serial cycles (bit index 0, 1, ...), preload once on the last of them,
// STREAM_CYCLES stream cycles and one result cycle. Small cycle counts.
module tb_bf_controller;
  import bf_pkg::*;
  localparam int SC = 6, STC = 10;
  logic clk = 0, rst_n = 1, adc_valid = 0, cfg_en = 0, any_fire = 0;
  phase_t phase;
  logic sample_en, serial_go, acc_start, rot_en, finish, busy;
  logic [2:0] bit_idx;
  int checks = 0, failures = 0, skipped = 0, ran = 0;

  bf_controller #(.SERIAL_CYCLES(SC), .STREAM_CYCLES(STC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 50; k++) begin
      int nser, nstr, nstart, nfin, cyc, nbad;
      bit f;
      f = $urandom_range(0, 1);
      nser = 0; nstr = 0; nstart = 0; nfin = 0; cyc = 0; nbad = 0;
      adc_valid = 1; #1;
      checks++; if (!sample_en) failures++;
      @(posedge clk); #1; adc_valid = 0;
      while (busy) begin
        any_fire = (phase == PH_FIRE) ? f : $urandom_range(0, 1);
        #1;
        if (serial_go) begin
          if (int'(bit_idx) != nser) nbad++;
          nser++;
        end
        if (rot_en) nstr++;
        if (acc_start) begin nstart++; if (int'(bit_idx) != SC - 1) nbad++; end
        if (finish) nfin++;
        if (sample_en) nbad++;
        @(posedge clk); #1; cyc++;
        if (cyc > 1000) break;
      end
      checks++;
      if (f ? (nser != SC || nstr != STC || nstart != 1 || nfin != 1 || cyc != 3 + SC + STC)
            : (nser != 0 || nstr != 0 || nstart != 0 || nfin != 0 || cyc != 2) || nbad != 0) begin
        failures++;
        $display("k=%0d fire=%0b serial=%0d stream=%0d start=%0d finish=%0d cycles=%0d bad=%0d", k, f, nser, nstr, nstart, nfin, cyc, nbad);
      end
      if (f) ran++; else skipped++;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
    end
    checks++; if (ran == 0 || skipped == 0) failures++;
    $display("ran=%0d skipped=%0d", ran, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
