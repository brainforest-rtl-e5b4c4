// tb_raf_fire_logic: noisy tones of several periods and amplitudes into the
// half-wave detector; fire and magnitude compared with the reference, and
// the cases where only one of the two thresholds held are counted.
module tb_raf_fire_logic;
  import bf_ref_pkg::*;
  logic clk = 0, rst_n = 1, in_valid = 0;
  logic signed [15:0] x = 0;
  logic [15:0] a_hyst = 0, d_th = 0, mag;
  logic fire;
  int checks = 0, failures = 0, fires = 0, dur_blocked = 0, amp_blocked = 0;
  raf_state_t r;

  raf_fire_logic dut (.*);
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
    for (int cfg = 0; cfg < 10; cfg++) begin
      real per, amp;
      #1 rst_n = 0; @(posedge clk); #1 rst_n = 1;
      raf_reset(r);
      a_hyst = 16'($urandom_range(0, 800));
      d_th   = 16'($urandom_range(1, 20));
      per    = real'($urandom_range(6, 60));
      amp    = real'($urandom_range(500, 20000));
      for (int n = 0; n < 600; n++) begin
        longint xv, elapsed;
        xv = longint'(amp * $sin(6.2831853 * n / per)) + longint'($urandom_range(0, 400)) - 200;
        x = 16'(sat16(xv));
        // reference: x is used directly as the filtered sample
        elapsed = (r.cnt >= 65535) ? 65535 : r.cnt + 1;
        if ((longint'(x) < r.a - longint'(a_hyst)) && !(elapsed >= longint'(d_th))) dur_blocked++;
        if (!(longint'(x) < r.a - longint'(a_hyst)) && (elapsed >= longint'(d_th))) amp_blocked++;
        r.fire = (longint'(x) < r.a - longint'(a_hyst)) && (elapsed >= longint'(d_th));
        if (longint'(x) < r.a - longint'(a_hyst)) begin
          if (r.fire) r.mag = (r.a < 0) ? 0 : r.a;
          r.cnt = 0; r.a = longint'(x);
        end
        else begin r.cnt = elapsed; if (longint'(x) > r.a) r.a = longint'(x); end
        in_valid = 1;
        @(posedge clk); #1;
        in_valid = 0;
        checks++;
        if (fire != r.fire || longint'(mag) != r.mag) begin
          failures++;
          if (failures < 10) $display("mismatch cfg=%0d n=%0d fire=%0b/%0b mag=%0d/%0d", cfg, n, fire, r.fire, mag, r.mag);
        end
        fires += r.fire;
      end
    end
    checks++; if (fires == 0)       begin failures++; $display("never fired"); end
    checks++; if (dur_blocked == 0) begin failures++; $display("duration threshold never blocked"); end
    checks++; if (amp_blocked == 0) begin failures++; $display("amplitude threshold never blocked"); end
    $display("fires=%0d duration-blocked=%0d amplitude-blocked=%0d", fires, dur_blocked, amp_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
