// euclidean_distance_unit: squared Euclidean distance between the input
// vector and one codebook vector.
//
// As in the original design, every component has its own subtractor and its
// own squaring unit, so all VEC_LEN components are handled in parallel, and
// an adder array sums the squares. The square root is never taken: the
// nearest codeword under the squared distance is the nearest under the
// distance itself. Purely combinational; in the encoder this path is the one
// that sets the clock period, since one codeword is examined per cycle.
//
//   in_vec, cw_vec : VEC_LEN components of COMP_W bits, element 0 = byte 1
//   sq_dist        : sum over k of (in_vec[k] - cw_vec[k])^2
module euclidean_distance_unit #(
  parameter int unsigned VEC_LEN = vq_pkg::VEC_LEN_DEF,
  parameter int unsigned COMP_W  = vq_pkg::COMP_W_DEF,
  localparam int unsigned DIST_W = vq_pkg::dist_width(COMP_W, VEC_LEN)
) (
  input  logic [VEC_LEN-1:0][COMP_W-1:0] in_vec,
  input  logic [VEC_LEN-1:0][COMP_W-1:0] cw_vec,
  output logic [DIST_W-1:0]              sq_dist
);

  logic signed [VEC_LEN-1:0][COMP_W:0]       diff;
  logic        [VEC_LEN-1:0][2*COMP_W-1:0]   sq;

  for (genvar k = 0; k < VEC_LEN; k++) begin : g_lane
    subtractor #(.COMP_W(COMP_W)) u_sub (
      .a    (in_vec[k]),
      .b    (cw_vec[k]),
      .diff (diff[k])
    );
    squaring_unit #(.IN_W(COMP_W + 1)) u_sq (
      .x  (diff[k]),
      .sq (sq[k])
    );
  end

  adder_array #(.N(VEC_LEN), .IN_W(2 * COMP_W)) u_sum (
    .terms (sq),
    .sum   (sq_dist)
  );

endmodule
