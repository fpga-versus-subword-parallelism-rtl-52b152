// subtractor: difference of one input-vector component and the matching
// codeword component.
//
// One of these sits on every component lane of the Euclidean distance unit,
// so all components are subtracted in parallel, as in the original design.
// The components are unsigned gray-level values; the result is kept one bit
// wider and signed so that no difference wraps (this width is a choice of
// this design). Purely combinational.
//
//   a, b : COMP_W-bit unsigned inputs
//   diff : (COMP_W+1)-bit signed a - b
module subtractor #(
  parameter int unsigned COMP_W = vq_pkg::COMP_W_DEF
) (
  input  logic        [COMP_W-1:0] a,
  input  logic        [COMP_W-1:0] b,
  output logic signed [COMP_W:0]   diff
);

  always_comb begin
    diff = $signed({1'b0, a}) - $signed({1'b0, b});
  end

endmodule
