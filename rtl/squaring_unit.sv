// squaring_unit: square of one signed component difference.
//
// Follows each subtractor in the Euclidean distance unit. The magnitude of the
// IN_W-bit signed input is taken first, so the square fits in 2*(IN_W-1)
// bits (the input is the difference of two unsigned values, so its most
// negative code never occurs). How the squarer is built inside is this
// design's choice: a plain multiplier of the magnitude by itself, which
// synthesis maps to the target's multipliers or logic. Purely combinational.
//
//   x  : IN_W-bit signed difference
//   sq : 2*(IN_W-1)-bit unsigned x*x
module squaring_unit #(
  parameter int unsigned IN_W = vq_pkg::COMP_W_DEF + 1
) (
  input  logic signed [IN_W-1:0]       x,
  output logic        [2*(IN_W-1)-1:0] sq
);

  logic [IN_W-2:0] mag;

  always_comb begin
    mag = (IN_W-1)'(x[IN_W-1] ? -x : x);  // |x|; drops the sign bit
    sq  = (2*(IN_W-1))'(mag) * (2*(IN_W-1))'(mag);
  end

endmodule
