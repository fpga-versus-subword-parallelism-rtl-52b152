// magnitude_comparator: one node of the distance comparison tree.
//
// Compares two distances and passes on the smaller one together with its
// codeword index, as in the original tree. On equal distances input a wins;
// the tree always feeds the lower-numbered codewords into a, so a tie goes to
// the lowest index (the tie rule is this design's choice). Combinational.
//
//   a_dist/a_idx, b_dist/b_idx : the two candidates
//   min_dist/min_idx           : the winner
module magnitude_comparator #(
  parameter int unsigned DIST_W = vq_pkg::dist_width(vq_pkg::COMP_W_DEF, vq_pkg::VEC_LEN_DEF),
  parameter int unsigned IDX_W  = vq_pkg::idx_width(vq_pkg::NUM_CODES_DEF)
) (
  input  logic [DIST_W-1:0] a_dist,
  input  logic [IDX_W-1:0]  a_idx,
  input  logic [DIST_W-1:0] b_dist,
  input  logic [IDX_W-1:0]  b_idx,
  output logic [DIST_W-1:0] min_dist,
  output logic [IDX_W-1:0]  min_idx
);

  always_comb begin
    if (b_dist < a_dist) begin
      min_dist = b_dist;
      min_idx  = b_idx;
    end else begin
      min_dist = a_dist;
      min_idx  = a_idx;
    end
  end

endmodule
