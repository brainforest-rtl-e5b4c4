// tb_stim_trigger: random classification results with stimulation enabled
// and disabled; a trigger must follow exactly the enabled positive results.
module tb_stim_trigger;
  logic clk = 0, rst_n = 1, valid = 0, class_in = 0, trigger, stim_en, cfg_en = 0, cfg_si = 0, cfg_so;
  int checks = 0, failures = 0, trig = 0, suppressed = 0;

  stim_trigger dut (.*);
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
    for (int k = 0; k < 400; k++) begin
      bit en, exp;
      if (k % 100 == 0) begin
        en = (k / 100) % 2 == 0;
        cfg_en = 1; cfg_si = en; @(posedge clk); #1; cfg_en = 0;
        checks++; if (stim_en != en || cfg_so != en) failures++;
      end
      valid = $urandom_range(0, 1); class_in = $urandom_range(0, 1);
      exp = valid && class_in && stim_en;
      @(posedge clk); #1;
      valid = 0;
      checks++; if (trigger != exp) failures++;
      if (exp) trig++;
      if (valid && class_in && !stim_en) suppressed++;
    end
    checks++; if (trig == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
