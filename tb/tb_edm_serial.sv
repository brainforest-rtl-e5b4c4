// tb_edm_serial: random inputs and decay shifts through the bit-serial
// leaky integrator. Each update's output stream is reassembled into the
// scaled state and compared with Y = Y - (Y >> alpha) + x; the number of
// active cycles must be 16 + alpha. Passes with en low must leave the state
// alone, and the state is checked to settle at x * 2^alpha for a constant x.
module tb_edm_serial;
  import bf_ref_pkg::*;
  logic clk = 0, rst_n = 1, en = 0, x_bit = 0, act, y_bit;
  logic [5:0] bit_idx = 0;
  logic [4:0] alpha = 0;
  int checks = 0, failures = 0;
  longint yref;

  edm_serial dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic update(input longint x, input bit enable);
    longint got = 0;
    int nact = 0;
    en = enable;
    for (int b = 0; b < 32; b++) begin
      bit_idx = 6'(b);
      x_bit = (b < 16) ? x[b] : 1'b0;
      #1;
      if (act) begin got[nact] = y_bit; nact++; end
      @(posedge clk); #1;
    end
    en = 0;
    if (enable) begin
      yref = edm_step(yref, x, int'(alpha));
      checks++;
      if (got != yref || nact != 16 + clamp_alpha(int'(alpha))) begin
        failures++;
        if (failures < 10) $display("mismatch alpha=%0d x=%0d got=%0d ref=%0d cycles=%0d", alpha, x, got, yref, nact);
      end
    end else begin
      checks++;
      if (nact != 0) failures++;
    end
  endtask

  initial begin
    for (int run = 0; run < 20; run++) begin
      #1 rst_n = 0; @(posedge clk); #1 rst_n = 1;
      yref = 0;
      alpha = 5'((run < 18) ? run : $urandom_range(17, 31));
      for (int n = 0; n < 60; n++)
        update(longint'($urandom_range(0, 65535)), $urandom_range(0, 4) != 0);
      // constant input: state must approach x << alpha
      for (int n = 0; n < 400 && alpha <= 6; n++) update(40000, 1);
      if (alpha <= 6) begin
        checks++;
        if ((yref >> clamp_alpha(int'(alpha))) < 39900) begin failures++; $display("did not settle"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
