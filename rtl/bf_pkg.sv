// bf_pkg: sizes shared by the BrainForest processor and the type of its
// event-driven phase sequencer.
//
// Numbers taken from the architecture: 8 ADC channels, 32 resonate-and-fire
// (RAF) neurons, 1024 depth-1 decision trees, 16-bit magnitudes and
// thresholds, and up to 16 extra fraction bits in each bit-serial leaky
// integrator. The split of the 1024 trees into 128 tiles of 8 comparators,
// the filter and weight formats and the accumulator width are this design's
// own choices.
package bf_pkg;

  localparam int unsigned N_CH           = 8;     // ADC channels
  localparam int unsigned N_RAF          = 32;    // resonate-and-fire neurons
  localparam int unsigned N_TREES        = 1024;  // decision trees (depth 1)
  localparam int unsigned TREES_PER_TILE = 8;     // comparators per EDM tile
  localparam int unsigned N_TILES        = N_TREES / TREES_PER_TILE;

  localparam int unsigned SAMPLE_W  = 16;  // ADC sample, two's complement
  localparam int unsigned DATA_W    = 16;  // magnitudes, A_HYST, D_TH, CP
  localparam int unsigned ALPHA_MAX = 16;  // extra EDM precision bits
  localparam int unsigned ALPHA_W   = 5;   // alpha field, 0..ALPHA_MAX
  localparam int unsigned LAM_W     = 4;   // filter / weight shift fields
  localparam int unsigned FRAC_W    = 12;  // filter state fraction bits
  localparam int unsigned CH_SEL_W  = $clog2(N_CH);
  localparam int unsigned RAF_SEL_W = $clog2(N_RAF);

  // One serial pass covers the longest EDM loop.
  localparam int unsigned SER_LEN = DATA_W + ALPHA_MAX;
  localparam int unsigned BIT_W   = $clog2(SER_LEN + 1);

  localparam int unsigned WEIGHT_W = 16;  // regenerated tree weight
  localparam int unsigned WFRAC_W  = 8;   // weight generator fraction bits
  localparam int unsigned ACC_W    = 28;  // decision accumulator, signed

  // Per-neuron configuration word, shifted in LSB first.
  typedef struct packed {
    logic [DATA_W-1:0]   d_th;    // minimum half-wave duration, samples
    logic [DATA_W-1:0]   a_hyst;  // amplitude hysteresis
    logic [LAM_W-1:0]    lam2;    // low-pass shift
    logic [LAM_W-1:0]    lam1;    // high-pass shift
    logic [CH_SEL_W-1:0] ch_sel;  // ADC channel
  } raf_cfg_t;

  // Per-tile configuration word (ahead of its comparison points).
  typedef struct packed {
    logic [ALPHA_W-1:0]   alpha;   // decay lambda = 2^-alpha
    logic [RAF_SEL_W-1:0] raf_sel; // neuron feeding the tile
  } tile_cfg_t;

  typedef enum logic [2:0] {
    PH_IDLE   = 3'd0,  // waiting for a sample
    PH_FILTER = 3'd1,  // RAF filters take the sample
    PH_FIRE   = 3'd2,  // RAF firing logic evaluates
    PH_SERIAL = 3'd3,  // bit-serial EDM updates and comparisons
    PH_STREAM = 3'd4,  // decision stream into the decision function
    PH_RESULT = 3'd5   // class available
  } phase_t;

endpackage
