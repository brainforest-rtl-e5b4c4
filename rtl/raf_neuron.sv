// raf_neuron: one resonate-and-fire neuron, a band-pass raf_filter followed
// by the raf_fire_logic half-wave detector, on one ADC channel.
//
// The neuron's settings (channel, the two filter shifts, A_HYST and D_TH,
// bf_pkg::raf_cfg_t) sit in a shift register that is one segment of the
// chip's configuration scan chain: while cfg_en is high, cfg_si shifts in at
// the top and the LSB leaves on cfg_so, so a word is shifted LSB first. The
// scan chain is this design's way of loading the model.
//
// Timing: sample_en takes the sample set; the filter output is ready one
// cycle later and fire/mag one cycle after that (two cycles of latency).
module raf_neuron
  import bf_pkg::raf_cfg_t, bf_pkg::DATA_W, bf_pkg::CH_SEL_W;
#(
  parameter int unsigned N_CH     = bf_pkg::N_CH,
  parameter int unsigned SAMPLE_W = bf_pkg::SAMPLE_W
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              sample_en,
  input  logic [N_CH-1:0][SAMPLE_W-1:0]     samples,
  input  logic                              cfg_en,
  input  logic                              cfg_si,
  output logic                              cfg_so,
  output logic                              fire,
  output logic [DATA_W-1:0]                 mag
);

  localparam int unsigned CFG_W = $bits(raf_cfg_t);

  raf_cfg_t cfg_q;
  logic signed [SAMPLE_W-1:0] x_sel, y;
  logic y_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cfg_q <= '0;
    else if (cfg_en) cfg_q <= {cfg_si, cfg_q[CFG_W-1:1]};
  end
  assign cfg_so = cfg_q[0];

  always_comb begin
    x_sel = samples[0];
    for (int unsigned c = 0; c < N_CH; c++)
      if (cfg_q.ch_sel == CH_SEL_W'(c)) x_sel = samples[c];
  end

  raf_filter #(.SAMPLE_W(SAMPLE_W)) u_filter (
    .clk, .rst_n, .sample_en, .x(x_sel),
    .lam1(cfg_q.lam1), .lam2(cfg_q.lam2), .y, .y_valid
  );

  raf_fire_logic #(.DATA_W(DATA_W)) u_fire (
    .clk, .rst_n, .in_valid(y_valid), .x(DATA_W'(y)),
    .a_hyst(cfg_q.a_hyst), .d_th(cfg_q.d_th), .fire, .mag
  );

endmodule
