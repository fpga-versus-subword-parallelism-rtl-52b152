// adder_array: adds the outputs of all squaring units into the squared
// Euclidean distance.
//
// The original design only says that the squares are added together; here the
// N terms are summed by a balanced binary tree of adders (log2(N) adder
// levels, each adder one bit wider than its inputs), which keeps the
// combinational depth low. The output is IN_W + clog2(N) bits wide and cannot
// overflow. Purely combinational.
//
//   terms : N unsigned IN_W-bit terms
//   sum   : their sum
module adder_array #(
  parameter int unsigned N    = vq_pkg::VEC_LEN_DEF,
  parameter int unsigned IN_W = 2 * vq_pkg::COMP_W_DEF
) (
  input  logic [N-1:0][IN_W-1:0]            terms,
  output logic [IN_W+$clog2(N)-1:0]         sum
);

  localparam int unsigned OUT_W  = IN_W + $clog2(N);
  localparam int unsigned LEAVES = 1 << $clog2(N);  // N rounded up to a power of two

  // Heap-ordered tree: node i has children 2i+1 and 2i+2, leaves start at
  // LEAVES-1. Every node is carried at the full output width.
  logic [OUT_W-1:0] node [2*LEAVES-1];

  for (genvar l = 0; l < LEAVES; l++) begin : g_leaf
    if (l < N) begin : g_term
      assign node[LEAVES-1+l] = OUT_W'(terms[l]);
    end else begin : g_pad
      assign node[LEAVES-1+l] = '0;
    end
  end

  for (genvar i = 0; i < LEAVES - 1; i++) begin : g_add
    assign node[i] = node[2*i+1] + node[2*i+2];
  end

  assign sum = node[0];

endmodule
