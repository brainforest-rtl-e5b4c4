// decision_forest: the tree array, N_TILES tree tiles in a chain.
//
// All tiles see the same RAF fire vector, serial magnitude lines and bit
// index; each one updates only when its own neuron fired. The decisions of
// all N_TILES*TREES_PER_TILE trees form one circular shift register: with
// rot_en high, dec_stream presents tree 0 of tile 0 first, then tree 1, ...
// and the bit leaving the chain re-enters at the far end, so after one full
// turn (N_TILES*TREES_PER_TILE shifts) every decision is back in its tree.
// Trees are placed so that stream position m is the m-th largest weight,
// which is what lets the weight generator stand in for a weight memory.
//
// Scan chain: cfg_si enters the last tile, tile 0 drives cfg_so (tile 0's
// words are shifted first). n_active counts the tiles running this pass,
// an activity figure for the gating.
module decision_forest
  import bf_pkg::BIT_W;
#(
  parameter int unsigned N_TILES        = bf_pkg::N_TILES,
  parameter int unsigned TREES_PER_TILE = bf_pkg::TREES_PER_TILE,
  parameter int unsigned N_RAF          = bf_pkg::N_RAF
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N_RAF-1:0]             fire,
  input  logic [N_RAF-1:0]             x_ser,
  input  logic                         serial_go,
  input  logic [BIT_W-1:0]             bit_idx,
  input  logic                         rot_en,
  output logic                         dec_stream,
  output logic [$clog2(N_TILES+1)-1:0] n_active,
  input  logic                         cfg_en,
  input  logic                         cfg_si,
  output logic                         cfg_so
);

  logic [N_TILES:0]   cchain, rchain;
  logic [N_TILES-1:0] act;

  assign cchain[N_TILES] = cfg_si;
  assign cfg_so          = cchain[0];
  assign dec_stream      = rchain[0];
  assign rchain[N_TILES] = rchain[0];

  for (genvar t = 0; t < N_TILES; t++) begin : g_tile
    tree_tile #(.TREES_PER_TILE(TREES_PER_TILE), .N_RAF(N_RAF)) u_tile (
      .clk, .rst_n, .fire, .x_ser, .serial_go, .bit_idx,
      .rot_en, .rot_in(rchain[t+1]), .rot_out(rchain[t]), .active(act[t]),
      .cfg_en, .cfg_si(cchain[t+1]), .cfg_so(cchain[t])
    );
  end

  always_comb begin
    n_active = '0;
    for (int unsigned t = 0; t < N_TILES; t++)
      n_active += $bits(n_active)'(act[t]);
  end

endmodule
