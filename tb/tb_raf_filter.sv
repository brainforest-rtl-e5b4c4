// tb_raf_filter: random samples and shift settings through raf_filter,
// output compared sample by sample with the integer reference model.
module tb_raf_filter;
  import bf_ref_pkg::*;
  logic clk = 0, rst_n = 1, sample_en = 0;
  logic signed [15:0] x = 0, y;
  logic [3:0] lam1 = 0, lam2 = 0;
  logic y_valid;
  int checks = 0, failures = 0;
  raf_state_t r;

  raf_filter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    for (int cfg = 0; cfg < 8; cfg++) begin
      #1 rst_n = 0; @(posedge clk); #1 rst_n = 1;
      raf_reset(r);
      lam1 = 4'($urandom_range(0, 9));
      lam2 = 4'($urandom_range(0, 9));
      for (int n = 0; n < 400; n++) begin
        // sine-like test tone plus noise, occasionally full scale
        x = (n % 97 == 0) ? ((n % 2) ? 16'sh7fff : 16'sh8000)
                          : 16'($signed($urandom_range(0, 40000)) - 20000);
        sample_en = 1;
        @(posedge clk); #1;
        sample_en = 0;
        raf_step(r, longint'(x), int'(lam1), int'(lam2), 0, 0);
        checks++;
        if (!y_valid || longint'(y) != r.y) begin
          failures++;
          if (failures < 10) $display("mismatch n=%0d lam=%0d/%0d x=%0d y=%0d ref=%0d lp1=%0d rlp1=%0d", n, lam1, lam2, x, y, r.y, dut.lp1_q, r.lp1);
        end
        if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; checks++; if (y_valid) failures++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
