// tb_tree_comparator: loads {pol, CP} through the scan segment, presents
// random serial values (with leading fraction bits that must be ignored),
// and checks decision = (y > CP) xor pol, that CP survives the rotation,
// and that the decision shifts along the stream when rot_en is high.
module tb_tree_comparator;
  logic clk = 0, rst_n = 1, y_bit = 0, cmp_en = 0, cmp_first = 0, cmp_last = 0;
  logic rot_en = 0, rot_in = 0, dec, cfg_en = 0, cfg_si = 0, cfg_so;
  int checks = 0, failures = 0, ones = 0;

  tree_comparator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] word, prev;
    #1 rst_n = 0; @(posedge clk); #1 rst_n = 1;
    prev = '0;
    for (int k = 0; k < 40; k++) begin
      int pre;
      word = 17'($urandom);
      if (k % 5 == 0) word[15:0] = 16'($urandom_range(0, 3));
      // scan in; the old word must come out on cfg_so
      cfg_en = 1;
      for (int b = 0; b < 17; b++) begin
        cfg_si = word[b]; #1;
        checks++; if (cfg_so != prev[b]) failures++;
        @(posedge clk); #1;
      end
      cfg_en = 0;
      prev = word;
      for (int t = 0; t < 20; t++) begin
        logic [15:0] y;
        bit exp;
        y = (t % 4 == 0) ? word[15:0] : 16'($urandom);
        if (t % 4 == 1) y = word[15:0] + 16'd1;
        pre = $urandom_range(0, 16);
        for (int b = 0; b < pre; b++) begin   // fraction bits: not compared
          y_bit = $urandom_range(0, 1); cmp_en = 0;
          @(posedge clk); #1;
        end
        for (int b = 0; b < 16; b++) begin
          y_bit = y[b]; cmp_en = 1; cmp_first = (b == 0); cmp_last = (b == 15);
          @(posedge clk); #1;
        end
        cmp_en = 0; cmp_first = 0; cmp_last = 0;
        exp = (y > word[15:0]) ^ word[16];
        checks++;
        if (dec != exp) begin
          failures++;
          if (failures < 10) $display("mismatch y=%0d cp=%0d pol=%0b dec=%0b", y, word[15:0], word[16], dec);
        end
        ones += exp;
        // stream shift
        rot_in = ~dec; rot_en = 1; @(posedge clk); #1; rot_en = 0;
        checks++; if (dec != rot_in) failures++;
      end
    end
    checks++; if (ones == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
