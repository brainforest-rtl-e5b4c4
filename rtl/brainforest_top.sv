// brainforest_top: the BrainForest brain-state classification processor.
//
// Signal path: eight ADC channels -> 32 resonate-and-fire neurons
// (raf_array: band-pass filter plus half-wave detector, each firing with
// the amplitude of the half-wave it saw) -> 1024-tree forest
// (decision_forest: per tile a bit-serial leaky integrator of one neuron's
// magnitudes and 8 bit-serial stump comparators) -> serial decision stream
// -> decision_function with weights from weight_regen -> stim_trigger.
// bf_controller sequences it; nothing past the neurons moves unless a
// neuron fired. The ADC array, the 2.5 V stimulation DAC, bias references
// and supplies are analog and outside this module: samples come in on
// adc_data/adc_valid and stim_trigger goes out.
//
// Configuration is one scan chain, shifted LSB first while cfg_en is high
// (only when idle). Shift order: neuron 0..N_RAF-1 (raf_cfg_t each), then
// for tile 0..N_TILES-1 its tile_cfg_t and comparators 0..7 ({pol, CP}
// each), then weight_regen {lam, w_max}, the accumulator preload, and the
// stimulation enable. cfg_so is the chain's end.
//
// Timing: adc_valid for one cycle while busy is low. If a neuron fired,
// class_valid pulses 1060 cycles later (defaults) with class_out, and
// stim_trigger follows one cycle after a positive, enabled result.
// class_acc is the final decision sum, acc_adding marks accumulator cycles
// that add a weight, tiles_active the tiles running in a serial pass and
// raf_fire the neurons that fired on the latest sample (activity monitors).
module brainforest_top
  import bf_pkg::N_CH, bf_pkg::SAMPLE_W, bf_pkg::N_RAF, bf_pkg::BIT_W,
         bf_pkg::WEIGHT_W, bf_pkg::ACC_W, bf_pkg::SER_LEN;
#(
  parameter int unsigned N_TILES        = bf_pkg::N_TILES,
  parameter int unsigned TREES_PER_TILE = bf_pkg::TREES_PER_TILE
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N_CH-1:0][SAMPLE_W-1:0] adc_data,
  input  logic                          adc_valid,
  input  logic                          cfg_en,
  input  logic                          cfg_si,
  output logic                          cfg_so,
  output logic                          busy,
  output logic [N_RAF-1:0]              raf_fire,
  output logic                          class_out,
  output logic                          class_valid,
  output logic                          stim_trigger,
  output logic                          acc_adding,
  output logic signed [ACC_W-1:0]       class_acc,
  output logic [$clog2(N_TILES+1)-1:0]  tiles_active
);

  localparam int unsigned NT = N_TILES * TREES_PER_TILE;

  logic                         sample_en, serial_go, acc_start, rot_en, finish;
  logic [BIT_W-1:0]             bit_idx;
  logic [N_RAF-1:0]             x_ser;
  logic                         dec_stream;
  logic [WEIGHT_W-1:0]          weight;
  logic                         c_raf_forest, c_forest_wr, c_wr_df, c_df_st;

  bf_controller #(.SERIAL_CYCLES(SER_LEN), .STREAM_CYCLES(NT)) u_ctrl (
    .clk, .rst_n, .adc_valid, .cfg_en, .any_fire(|raf_fire),
    .phase(), .sample_en, .serial_go, .bit_idx, .acc_start, .rot_en, .finish, .busy
  );

  raf_array u_raf (
    .clk, .rst_n, .sample_en, .samples(adc_data), .bit_idx,
    .cfg_en, .cfg_si(c_raf_forest), .cfg_so,
    .fire(raf_fire), .mag(), .x_ser
  );

  decision_forest #(.N_TILES(N_TILES), .TREES_PER_TILE(TREES_PER_TILE)) u_forest (
    .clk, .rst_n, .fire(raf_fire), .x_ser, .serial_go, .bit_idx,
    .rot_en, .dec_stream, .n_active(tiles_active),
    .cfg_en, .cfg_si(c_forest_wr), .cfg_so(c_raf_forest)
  );

  weight_regen u_wgen (
    .clk, .rst_n, .start(acc_start), .step(rot_en), .weight,
    .cfg_en, .cfg_si(c_wr_df), .cfg_so(c_forest_wr)
  );

  decision_function u_dfun (
    .clk, .rst_n, .start(acc_start), .step(rot_en), .tree(dec_stream), .weight,
    .finish, .class_out, .valid(class_valid), .acc(class_acc), .adding(acc_adding),
    .cfg_en, .cfg_si(c_df_st), .cfg_so(c_wr_df)
  );

  stim_trigger u_stim (
    .clk, .rst_n, .valid(class_valid), .class_in(class_out), .trigger(stim_trigger),
    .stim_en(), .cfg_en, .cfg_si, .cfg_so(c_df_st)
  );

endmodule
