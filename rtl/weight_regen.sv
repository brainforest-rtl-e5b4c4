// weight_regen: on-chip tree weight generator, replacing a weight memory.
//
// Boosted-tree weights fall off roughly exponentially with their rank, and
// the trees are placed in the forest sorted by weight. The generator is a
// first-order decay: loaded with the largest weight w_max, it steps once
// per tree of the decision stream,
//   w <= w - (w >> lam)
// so the weight of stream position m is about w_max * (1 - 2^-lam)^m.
// lam is the fitted decay rate (5..9 suit a 1024-tree model). WFRAC_W
// fraction bits below the weight keep small decrements from being lost;
// the fraction width and the output (the integer part) are this design's.
//
// Configuration: {lam, w_max}, LAM_W+WEIGHT_W bits of the scan chain,
// shifted LSB first.
// Timing: start loads w_max (weight valid the next cycle); each step
// advances to the next tree at the clock edge.
module weight_regen
#(
  parameter int unsigned WEIGHT_W = bf_pkg::WEIGHT_W,
  parameter int unsigned WFRAC_W  = bf_pkg::WFRAC_W,
  parameter int unsigned LAM_W    = bf_pkg::LAM_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                step,
  output logic [WEIGHT_W-1:0] weight,
  input  logic                cfg_en,
  input  logic                cfg_si,
  output logic                cfg_so
);

  localparam int unsigned CFG_W = LAM_W + WEIGHT_W;
  localparam int unsigned W_W   = WEIGHT_W + WFRAC_W;

  logic [CFG_W-1:0]    cfg_q;
  logic [WEIGHT_W-1:0] w_max;
  logic [LAM_W-1:0]    lam;
  logic [W_W-1:0]      w_q;

  assign {lam, w_max} = cfg_q;
  assign cfg_so       = cfg_q[0];
  assign weight       = w_q[W_W-1:WFRAC_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q <= '0;
      w_q   <= '0;
    end else begin
      if (cfg_en)     cfg_q <= {cfg_si, cfg_q[CFG_W-1:1]};
      if (start)      w_q   <= {w_max, WFRAC_W'(0)};
      else if (step)  w_q   <= w_q - (w_q >> lam);
    end
  end

endmodule
