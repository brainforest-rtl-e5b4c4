// raf_filter: first stage of a resonate-and-fire neuron, a coarse
// multiplier-less band-pass filter.
//
// Two first-order IIR sections with power-of-two coefficients, so every
// coefficient product is an arithmetic right shift:
//   lp1[n] = lp1[n-1] + ((x[n]   - lp1[n-1]) >>> lam1)   low-pass
//   hp[n]  = x[n] - lp1[n]                                 high-pass
//   lp2[n] = lp2[n-1] + ((hp[n]  - lp2[n-1]) >>> lam2)   low-pass
//   y[n]   = lp2[n]
// A high-pass followed by a low-pass is the concatenated low/high-pass
// structure of the architecture; the exact section order and the FRAC_W
// fraction bits kept in the states (so that small steps are not lost) are
// this design's choices.
//
// Interface: x is a two's complement sample taken when sample_en is high.
// y (saturated to SAMPLE_W bits) is registered and y_valid pulses one cycle
// later. lam1 and lam2 are static configuration.
module raf_filter
#(
  parameter int unsigned SAMPLE_W = bf_pkg::SAMPLE_W,
  parameter int unsigned FRAC_W   = bf_pkg::FRAC_W,
  parameter int unsigned LAM_W    = bf_pkg::LAM_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       sample_en,
  input  logic signed [SAMPLE_W-1:0] x,
  input  logic        [LAM_W-1:0]    lam1,
  input  logic        [LAM_W-1:0]    lam2,
  output logic signed [SAMPLE_W-1:0] y,
  output logic                       y_valid
);

  localparam int unsigned ST_W = SAMPLE_W + FRAC_W + 3;
  localparam logic signed [ST_W-1:0] Y_MAX = ST_W'((2 ** (SAMPLE_W - 1)) - 1);
  localparam logic signed [ST_W-1:0] Y_MIN = -ST_W'(2 ** (SAMPLE_W - 1));

  logic signed [ST_W-1:0] lp1_q, lp2_q;
  logic signed [ST_W-1:0] xs, lp1_d, hp, lp2_d, y_full;

  always_comb begin
    xs     = ST_W'(x) <<< FRAC_W;
    lp1_d  = lp1_q + ((xs - lp1_q) >>> lam1);
    hp     = xs - lp1_d;
    lp2_d  = lp2_q + ((hp - lp2_q) >>> lam2);
    y_full = lp2_d >>> FRAC_W;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lp1_q   <= '0;
      lp2_q   <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= sample_en;
      if (sample_en) begin
        lp1_q <= lp1_d;
        lp2_q <= lp2_d;
        if (y_full > Y_MAX)      y <= SAMPLE_W'(Y_MAX);
        else if (y_full < Y_MIN) y <= SAMPLE_W'(Y_MIN);
        else                     y <= SAMPLE_W'(y_full);
      end
    end
  end

endmodule
