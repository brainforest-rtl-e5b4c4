// tree_comparator: one depth-1 decision tree (stump) of the forest,
// realised as a bit-serial magnitude comparator.
//
// The comparison point CP sits in a DATA_W-bit shift register (the
// distributed tree comparison point memory) that rotates by one bit for
// every compared bit, so it is back in place after each comparison. The
// serial comparator works LSB first: gt <= (y & ~cp) | (~(y ^ cp) & gt),
// so after the last bit gt = (y > CP). The decision is gt XOR pol, where
// pol is a polarity bit stored with CP (this design's addition, letting a
// tree vote for the target class below its threshold).
//
// The decision flip-flop doubles as one stage of the forest's serial
// decision stream: with rot_en high it takes rot_in, and dec feeds the
// previous stage.
//
// Configuration: {pol, CP} is a DATA_W+1 bit segment of the scan chain,
// shifted LSB first while cfg_en is high.
// Timing: cmp_en marks the DATA_W compared bits, cmp_first the first of
// them (clears gt) and cmp_last the last (the decision updates at its end).
module tree_comparator #(
  parameter int unsigned DATA_W = bf_pkg::DATA_W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic y_bit,
  input  logic cmp_en,
  input  logic cmp_first,
  input  logic cmp_last,
  input  logic rot_en,
  input  logic rot_in,
  output logic dec,
  input  logic cfg_en,
  input  logic cfg_si,
  output logic cfg_so
);

  logic [DATA_W-1:0] cp_q;
  logic              pol_q, gt_q, gt_in, gt_d;

  always_comb begin
    gt_in = cmp_first ? 1'b0 : gt_q;
    gt_d  = (y_bit & ~cp_q[0]) | (~(y_bit ^ cp_q[0]) & gt_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cp_q  <= '0;
      pol_q <= 1'b0;
      gt_q  <= 1'b0;
      dec   <= 1'b0;
    end else if (cfg_en) begin
      {pol_q, cp_q} <= {cfg_si, pol_q, cp_q[DATA_W-1:1]};
    end else begin
      if (cmp_en) begin
        cp_q <= {cp_q[0], cp_q[DATA_W-1:1]};
        gt_q <= gt_d;
      end
      if (cmp_en && cmp_last) dec <= gt_d ^ pol_q;
      else if (rot_en)        dec <= rot_in;
    end
  end
  assign cfg_so = cp_q[0];

endmodule
