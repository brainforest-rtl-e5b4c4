// edm_serial: bit-serial exponentially decaying memory (EDM), the leaky
// integrator neuron of the BrainForest tiles.
//
// The integrator is y[n] = y[n-1] + lambda*(x[n] - y[n-1]) with
// lambda = 2^-alpha. Kept as Y = 2^alpha * y, the update needs no shift of
// the data word and therefore drops no low bits:
//   Y[n] = Y[n-1] - y[n-1] + x[n],   y[n-1] = Y[n-1] >> alpha
// The state is a circulating shift register whose length is DATA_W + alpha
// (variable precision: alpha extra low-order bits for slower decays). Bits
// travel LSB first; while bit b of Y[n-1] sits at the register head, the
// register tap alpha places further holds bit b+alpha, i.e. bit b of
// y[n-1]. A first serial full adder forms x - y[n-1] (inverted tap, carry
// preset to 1) and a second adds Y[n-1]; each keeps its carry in a flip-flop.
// Inputs are unsigned magnitudes, so Y never goes negative and y bits from
// DATA_W upwards are zero (the tap is masked there).
//
// Interface and timing: an update takes DATA_W + alpha cycles. The caller
// holds en high and steps bit_idx 0, 1, 2, ... (bit_idx = 0 restarts the
// carries); x_bit is bit bit_idx of x[n] (0 from DATA_W on). Each active
// cycle produces y_bit, bit bit_idx of Y[n], i.e. bit bit_idx-alpha of
// y[n]; act marks those cycles. alpha above ALPHA_MAX is treated as
// ALPHA_MAX. The serial form follows the architecture; the multiplexer that
// realises the selectable loop length and tap is this design's.
module edm_serial
#(
  parameter int unsigned DATA_W    = bf_pkg::DATA_W,
  parameter int unsigned ALPHA_MAX = bf_pkg::ALPHA_MAX,
  parameter int unsigned ALPHA_W   = bf_pkg::ALPHA_W,
  parameter int unsigned BIT_W     = $clog2(DATA_W + ALPHA_MAX + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [BIT_W-1:0]   bit_idx,
  input  logic [ALPHA_W-1:0] alpha,
  input  logic               x_bit,
  output logic               act,
  output logic               y_bit
);

  localparam int unsigned LEN = DATA_W + ALPHA_MAX;

  logic [LEN-1:0]     s_q;
  logic [ALPHA_W-1:0] alpha_c;
  logic [BIT_W-1:0]   len;
  logic               tap, c1_in, c2_in, sum1, c1_d, c2_d;
  logic               c1_q, c2_q;

  always_comb begin
    alpha_c = (alpha > ALPHA_W'(ALPHA_MAX)) ? ALPHA_W'(ALPHA_MAX) : alpha;
    len     = BIT_W'(DATA_W) + BIT_W'(alpha_c);
    act     = en && (bit_idx < len);
    tap     = (bit_idx < BIT_W'(DATA_W)) ? s_q[alpha_c] : 1'b0;
    c1_in   = (bit_idx == '0) ? 1'b1 : c1_q;
    c2_in   = (bit_idx == '0) ? 1'b0 : c2_q;
    // full adder 1: x - y[n-1]
    sum1    = x_bit ^ ~tap ^ c1_in;
    c1_d    = (x_bit & ~tap) | (x_bit & c1_in) | (~tap & c1_in);
    // full adder 2: + Y[n-1]
    y_bit   = s_q[0] ^ sum1 ^ c2_in;
    c2_d    = (s_q[0] & sum1) | (s_q[0] & c2_in) | (sum1 & c2_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q  <= '0;
      c1_q <= 1'b0;
      c2_q <= 1'b0;
    end else if (act) begin
      c1_q <= c1_d;
      c2_q <= c2_d;
      for (int unsigned i = 0; i < LEN; i++) begin
        if (BIT_W'(i) == len - 1'b1)  s_q[i] <= y_bit;
        else if (BIT_W'(i) < len - 1'b1) s_q[i] <= s_q[(i + 1) % LEN];
      end
    end
  end

endmodule
