// temporary_distance_storage: one register per codeword holding the distance
// between the current input vector and that codeword.
//
// The distance unit's output is written on the rising edge into the register
// selected by the code selection counter; all registers are presented in
// parallel to the distance comparison tree, which evaluates them once the
// whole codebook has been scanned. The registers reset to the largest
// distance (reset value is this design's choice).
//
//   we, waddr, wdist : write one distance
//   dists            : all NUM_CODES distances, element i = codeword i
module temporary_distance_storage #(
  parameter int unsigned NUM_CODES = vq_pkg::NUM_CODES_DEF,
  parameter int unsigned DIST_W    = vq_pkg::dist_width(vq_pkg::COMP_W_DEF, vq_pkg::VEC_LEN_DEF),
  localparam int unsigned IDX_W    = vq_pkg::idx_width(NUM_CODES)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             we,
  input  logic [IDX_W-1:0]                 waddr,
  input  logic [DIST_W-1:0]                wdist,
  output logic [NUM_CODES-1:0][DIST_W-1:0] dists
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dists <= '1;
    end else if (we && (32'(waddr) < NUM_CODES)) begin
      dists[waddr] <= wdist;
    end
  end

endmodule
