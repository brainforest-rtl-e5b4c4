// tb_weight_regen: for several maximum weights and decay rates (5..9 and
// extremes) the generated sequence over 1024 steps is compared with the
// closed-loop reference w(m+1) = w(m) - (w(m) >> lam); it must also be
// non-increasing.
module tb_weight_regen;
  import bf_ref_pkg::*;
  logic clk = 0, rst_n = 1, start = 0, step = 0, cfg_en = 0, cfg_si = 0, cfg_so;
  logic [15:0] weight;
  int checks = 0, failures = 0;

  weight_regen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 9; k++) begin
      logic [19:0] word;
      longint w, prev;
      int lam;
      lam = (k < 5) ? 5 + k : $urandom_range(0, 15);
      word = {4'(lam), 16'($urandom_range(1000, 65535))};
      cfg_en = 1;
      for (int b = 0; b < 20; b++) begin cfg_si = word[b]; @(posedge clk); #1; end
      cfg_en = 0;
      start = 1; @(posedge clk); #1; start = 0;
      w = longint'(word[15:0]) * 256;
      prev = 1 << 30;
      for (int m = 0; m < 1024; m++) begin
        checks++;
        if (longint'(weight) != (w >> 8) || longint'(weight) > prev) begin
          failures++;
          if (failures < 10) $display("lam=%0d m=%0d got=%0d exp=%0d", lam, m, weight, w >> 8);
        end
        prev = longint'(weight);
        w = w - (w >> lam);
        step = 1; @(posedge clk); #1; step = 0;
        if ($urandom_range(0, 7) == 0) begin @(posedge clk); #1; end  // idle cycle: holds
      end
      checks++;
      if (weight_at(longint'(word[15:0]), lam, 1024) != longint'(weight)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
