// raf_fire_logic: second stage of a resonate-and-fire neuron, the
// non-linear firing logic (half-wave detector).
//
// Two branches are combined by an AND:
//  * amplitude branch: register A follows the filtered sample upwards
//    (A <= x whenever x > A), so it holds the last peak. A sample that has
//    dropped below A - A_HYST marks the falling edge of a half-wave; the
//    hysteresis keeps noise ripple from firing.
//  * duration branch: a saturating sample counter counts samples since the
//    last half-wave detection (it is reset by the amplitude branch); the
//    half-wave only fires the neuron if the count has reached D_TH, the
//    minimum period of the band. Waves faster than the band keep resetting
//    the counter and never fire.
// After a detection A restarts from the current sample, so on a falling
// slope detections repeat every A_HYST of descent and the count really
// starts near the trough; it then measures trough-to-peak time. On a
// firing the peak A (clipped at zero) is latched to mag as the band energy
// feature. Restarting A from the sample is this design's choice.
// Because A is clipped at zero, the top bit of mag is always 0; the port
// keeps the full DATA_W width of the magnitude words used downstream.
//
// Timing: one evaluation per in_valid. From the following cycle until the
// next evaluation, fire tells whether this sample fired the neuron (the
// flag the tiles use during the serial update) and mag holds the magnitude
// of the latest firing.
module raf_fire_logic #(
  parameter int unsigned DATA_W = bf_pkg::DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x,
  input  logic        [DATA_W-1:0] a_hyst,
  input  logic        [DATA_W-1:0] d_th,
  output logic                     fire,
  output logic        [DATA_W-1:0] mag
);

  logic signed [DATA_W-1:0] a_q;
  logic        [DATA_W-1:0] cnt_q, elapsed;
  logic signed [DATA_W+1:0] thr;
  logic                     amp_ok, dur_ok, fire_d;

  always_comb begin
    elapsed = (cnt_q == '1) ? cnt_q : cnt_q + 1'b1;
    thr     = (DATA_W+2)'(a_q) - $signed({2'b00, a_hyst});
    amp_ok  = (DATA_W+2)'(x) < thr;
    dur_ok  = elapsed >= d_th;
    fire_d  = amp_ok && dur_ok;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      cnt_q <= '0;
      fire  <= 1'b0;
      mag   <= '0;
    end else begin
      if (in_valid) begin
        fire <= fire_d;
        if (amp_ok) begin
          // a half-wave ended: restart the period count and the peak
          cnt_q <= '0;
          a_q   <= x;
          if (dur_ok) mag <= a_q[DATA_W-1] ? '0 : DATA_W'(a_q);
        end else begin
          cnt_q <= elapsed;
          if (x > a_q) a_q <= x;
        end
      end
    end
  end

endmodule
