// tb_decision_function: random preloads, votes and weights; the result
// must be sign(preload + sum of weights of trees voting 1) with a zero sum
// counting as class 0, and the accumulator must only move on votes of 1.
module tb_decision_function;
  logic clk = 0, rst_n = 1, start = 0, step = 0, tree = 0, finish = 0;
  logic [15:0] weight = 0;
  logic class_out, valid, adding, cfg_en = 0, cfg_si = 0, cfg_so;
  logic signed [27:0] acc;
  int checks = 0, failures = 0, pos = 0, neg = 0;

  decision_function dut (.*);
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
    for (int k = 0; k < 60; k++) begin
      longint pre, sum;
      logic signed [27:0] p;
      int n;
      n = $urandom_range(1, 300);
      pre = (k % 10 == 7) ? -longint'($urandom_range(0, 60000)) : -longint'($urandom_range(0, 2000000));
      p = 28'(pre);
      cfg_en = 1;
      for (int b = 0; b < 28; b++) begin cfg_si = p[b]; @(posedge clk); #1; end
      cfg_en = 0;
      start = 1; @(posedge clk); #1; start = 0;
      sum = pre;
      for (int m = 0; m < n; m++) begin
        longint acc_prev;
        tree = (k % 10 != 7) && ($urandom_range(0, 99) < 3 * (k % 8));
        weight = 16'($urandom_range(0, 65535));
        if (k % 10 == 7 && m == n - 1) begin tree = 1; weight = 16'(-sum); end  // sum exactly zero
        acc_prev = longint'(acc);
        step = 1; @(posedge clk); #1; step = 0;
        if (tree) sum += longint'(weight);
        checks++;
        if (longint'(acc) != sum || (!tree && longint'(acc) != acc_prev)) failures++;
      end
      finish = 1; @(posedge clk); #1; finish = 0;
      checks++;
      if (!valid || class_out != (sum > 0)) begin
        failures++;
        $display("k=%0d sum=%0d class=%0b valid=%0b", k, sum, class_out, valid);
      end
      if (sum > 0) pos++; else neg++;
      @(posedge clk); #1;
      checks++; if (valid) failures++;
    end
    checks++; if (pos == 0 || neg == 0) failures++;
    $display("positive=%0d negative=%0d", pos, neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
