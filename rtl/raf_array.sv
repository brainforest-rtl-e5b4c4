// raf_array: the feature extractor, N_RAF resonate-and-fire neurons that
// share the N_CH ADC channels (each neuron picks its channel and band).
//
// Outputs per neuron: fire (did the latest sample fire it) and its latest
// magnitude sent bit-serially, LSB first: x_ser[i] is bit bit_idx of the
// magnitude, 0 beyond DATA_W. The tiles of the decision forest take their
// input from these serial lines, as in a bit-serial datapath the magnitude
// never travels as a word.
//
// The neurons' configuration registers form one scan chain: cfg_si enters
// neuron N_RAF-1 and neuron 0 drives cfg_so, so neuron 0's word is shifted
// in first.
module raf_array
  import bf_pkg::BIT_W, bf_pkg::DATA_W;
#(
  parameter int unsigned N_RAF    = bf_pkg::N_RAF,
  parameter int unsigned N_CH     = bf_pkg::N_CH,
  parameter int unsigned SAMPLE_W = bf_pkg::SAMPLE_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          sample_en,
  input  logic [N_CH-1:0][SAMPLE_W-1:0] samples,
  input  logic [BIT_W-1:0]              bit_idx,
  input  logic                          cfg_en,
  input  logic                          cfg_si,
  output logic                          cfg_so,
  output logic [N_RAF-1:0]              fire,
  output logic [N_RAF-1:0][DATA_W-1:0]  mag,
  output logic [N_RAF-1:0]              x_ser
);

  logic [N_RAF:0] chain;

  assign chain[N_RAF] = cfg_si;
  assign cfg_so       = chain[0];

  for (genvar i = 0; i < N_RAF; i++) begin : g_neuron
    raf_neuron #(.N_CH(N_CH), .SAMPLE_W(SAMPLE_W)) u_neuron (
      .clk, .rst_n, .sample_en, .samples,
      .cfg_en, .cfg_si(chain[i+1]), .cfg_so(chain[i]),
      .fire(fire[i]), .mag(mag[i])
    );
    assign x_ser[i] = (bit_idx < BIT_W'(DATA_W)) ? mag[i][bit_idx[$clog2(DATA_W)-1:0]] : 1'b0;
  end

endmodule
