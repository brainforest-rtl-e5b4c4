// decision_function: the classifier output, sign(sum_m alpha(m)*TREE(m,x))
// with TREE = +1 (target state) or -1.
//
// The accumulator is preloaded with the all-minus-one result, -sum(alpha),
// a scan-chain constant. Each tree of the decision stream that votes +1
// then adds its regenerated step weight (2*alpha(m), from weight_regen);
// a tree voting -1 adds nothing and the accumulator register is not even
// enabled (data gating). Because the target state (a seizure) is rare,
// nearly all trees vote -1 nearly all the time and the adder rarely
// switches. The class is 1 when the final sum is above zero; a sum of
// exactly zero counts as class -1 (this design's choice).
//
// Configuration: preload, ACC_W bits, two's complement, LSB first.
// Timing: start preloads, step with tree/weight accumulates one tree,
// finish latches class_out and pulses valid in the next cycle.
module decision_function
#(
  parameter int unsigned ACC_W    = bf_pkg::ACC_W,
  parameter int unsigned WEIGHT_W = bf_pkg::WEIGHT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    step,
  input  logic                    tree,
  input  logic [WEIGHT_W-1:0]     weight,
  input  logic                    finish,
  output logic                    class_out,
  output logic                    valid,
  output logic signed [ACC_W-1:0] acc,
  output logic                    adding,
  input  logic                    cfg_en,
  input  logic                    cfg_si,
  output logic                    cfg_so
);

  logic signed [ACC_W-1:0] preload;

  assign cfg_so = preload[0];
  assign adding = step && tree;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      preload   <= '0;
      acc       <= '0;
      class_out <= 1'b0;
      valid     <= 1'b0;
    end else begin
      valid <= finish;
      if (cfg_en)      preload <= {cfg_si, preload[ACC_W-1:1]};
      if (start)       acc <= preload;
      else if (adding) acc <= acc + $signed({{(ACC_W-WEIGHT_W){1'b0}}, weight});
      if (finish)      class_out <= acc > 0;
    end
  end

endmodule
