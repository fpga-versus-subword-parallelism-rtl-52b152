// distance_comparison_unit: finds the smallest of NUM_CODES distances and its
// index with a binary tree of magnitude comparators.
//
// As in the original design, distances 1 and 2, 3 and 4, ... meet in the first
// level of comparators, and the winners are paired again level by level until
// one comparator gives the minimum (31 comparators in 5 levels for 32
// codewords). Each comparator carries the index of its winner along with the
// distance. A NUM_CODES that is not a power of two is padded with the largest
// distance, which can never win because ties go to the lower index.
// Purely combinational.
//
//   dists            : element i is the distance to codeword i
//   min_dist/min_idx : smallest distance and its index (lowest index on a tie)
module distance_comparison_unit #(
  parameter int unsigned NUM_CODES = vq_pkg::NUM_CODES_DEF,
  parameter int unsigned DIST_W    = vq_pkg::dist_width(vq_pkg::COMP_W_DEF, vq_pkg::VEC_LEN_DEF),
  localparam int unsigned IDX_W    = vq_pkg::idx_width(NUM_CODES)
) (
  input  logic [NUM_CODES-1:0][DIST_W-1:0] dists,
  output logic [DIST_W-1:0]                min_dist,
  output logic [IDX_W-1:0]                 min_idx
);

  localparam int unsigned LEAVES = 1 << $clog2(NUM_CODES);

  // Heap-ordered tree: node i is fed by nodes 2i+1 (a side) and 2i+2 (b side);
  // leaf l sits at LEAVES-1+l, so lower codeword numbers are always on a.
  logic [DIST_W-1:0] node_dist [2*LEAVES-1];
  logic [IDX_W-1:0]  node_idx  [2*LEAVES-1];

  for (genvar l = 0; l < LEAVES; l++) begin : g_leaf
    if (l < NUM_CODES) begin : g_in
      assign node_dist[LEAVES-1+l] = dists[l];
      assign node_idx[LEAVES-1+l]  = IDX_W'(l);
    end else begin : g_pad
      assign node_dist[LEAVES-1+l] = '1;
      assign node_idx[LEAVES-1+l]  = '0;
    end
  end

  for (genvar i = 0; i < LEAVES - 1; i++) begin : g_cmp
    magnitude_comparator #(.DIST_W(DIST_W), .IDX_W(IDX_W)) u_cmp (
      .a_dist   (node_dist[2*i+1]),
      .a_idx    (node_idx[2*i+1]),
      .b_dist   (node_dist[2*i+2]),
      .b_idx    (node_idx[2*i+2]),
      .min_dist (node_dist[i]),
      .min_idx  (node_idx[i])
    );
  end

  assign min_dist = node_dist[0];
  assign min_idx  = node_idx[0];

endmodule
