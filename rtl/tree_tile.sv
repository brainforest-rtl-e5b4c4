// tree_tile: one EDM decision tree tile, a bit-serial leaky integrator
// (edm_serial) whose output stream feeds TREES_PER_TILE bit-serial tree
// comparators.
//
// The tile listens to one RAF neuron (raf_sel) and integrates with decay
// 2^-alpha. It is activity gated: during the serial phase it runs only if
// its neuron fired on the current sample, otherwise its state, comparison
// points and decisions stay untouched. (The gating is a clock enable here;
// the silicon gates the clock.) The integer part of the new EDM value, bits
// alpha .. alpha+DATA_W-1 of the serial stream, is what the comparators see.
//
// Scan chain: {alpha, raf_sel} (bf_pkg::tile_cfg_t) nearest cfg_so, then
// comparator 0 .. TREES_PER_TILE-1; shift the tile word first.
// Decision stream: comparator 0 drives rot_out, comparator J-1 takes rot_in.
// Timing: serial_go high with bit_idx counting 0 .. DATA_W+ALPHA_MAX-1; the
// decisions are final after bit alpha+DATA_W-1.
module tree_tile
  import bf_pkg::tile_cfg_t, bf_pkg::BIT_W, bf_pkg::ALPHA_W, bf_pkg::ALPHA_MAX, bf_pkg::DATA_W;
#(
  parameter int unsigned TREES_PER_TILE = bf_pkg::TREES_PER_TILE,
  parameter int unsigned N_RAF          = bf_pkg::N_RAF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_RAF-1:0]   fire,
  input  logic [N_RAF-1:0]   x_ser,
  input  logic               serial_go,
  input  logic [BIT_W-1:0]   bit_idx,
  input  logic               rot_en,
  input  logic               rot_in,
  output logic               rot_out,
  output logic               active,
  input  logic               cfg_en,
  input  logic               cfg_si,
  output logic               cfg_so
);

  localparam int unsigned TCFG_W = $bits(tile_cfg_t);
  localparam int unsigned SEL_W  = (N_RAF > 1) ? $clog2(N_RAF) : 1;

  tile_cfg_t          cfg_q;
  logic [SEL_W-1:0]   sel;
  logic [ALPHA_W-1:0] alpha_c;
  logic               x_bit, y_bit, edm_act;
  logic               cmp_en, cmp_first, cmp_last;
  logic [TREES_PER_TILE:0] cchain, rchain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cfg_q <= '0;
    else if (cfg_en) cfg_q <= {cchain[0], cfg_q[TCFG_W-1:1]};
  end
  assign cfg_so = cfg_q[0];

  always_comb begin
    sel     = SEL_W'(cfg_q.raf_sel);
    alpha_c = (cfg_q.alpha > ALPHA_W'(ALPHA_MAX)) ? ALPHA_W'(ALPHA_MAX) : cfg_q.alpha;
    active  = serial_go && !cfg_en && fire[sel];
    x_bit   = x_ser[sel];
    cmp_en    = edm_act && (bit_idx >= BIT_W'(alpha_c)) &&
                (bit_idx < BIT_W'(alpha_c) + BIT_W'(DATA_W));
    cmp_first = bit_idx == BIT_W'(alpha_c);
    cmp_last  = bit_idx == BIT_W'(alpha_c) + BIT_W'(DATA_W - 1);
  end

  edm_serial u_edm (
    .clk, .rst_n, .en(active), .bit_idx, .alpha(alpha_c),
    .x_bit, .act(edm_act), .y_bit
  );

  assign cchain[TREES_PER_TILE] = cfg_si;
  assign rchain[TREES_PER_TILE] = rot_in;
  assign rot_out = rchain[0];

  for (genvar j = 0; j < TREES_PER_TILE; j++) begin : g_tree
    tree_comparator u_cmp (
      .clk, .rst_n, .y_bit, .cmp_en, .cmp_first, .cmp_last,
      .rot_en, .rot_in(rchain[j+1]), .dec(rchain[j]),
      .cfg_en, .cfg_si(cchain[j+1]), .cfg_so(cchain[j])
    );
  end

endmodule
