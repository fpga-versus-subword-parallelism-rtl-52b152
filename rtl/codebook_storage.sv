// codebook_storage: the codebook, NUM_CODES codewords of VEC_LEN components
// (by default 32 x 16 bytes, a 32 x 128 bit memory).
//
// The read address comes from the code selection counter, and the read is
// combinational, so the addressed codeword reaches the distance unit within
// the same clock cycle, as in the original single-cycle scan. The original
// design does not say how the codebook is filled; this design gives it a
// synchronous write port (we, waddr, wdata) through which a codebook trained
// elsewhere is loaded. The contents are not reset.
//
//   clk, we, waddr, wdata : write one codeword on the rising edge
//   raddr, rdata          : read one codeword, combinational
// Element 0 of a codeword is its first byte.
module codebook_storage #(
  parameter int unsigned NUM_CODES = vq_pkg::NUM_CODES_DEF,
  parameter int unsigned VEC_LEN   = vq_pkg::VEC_LEN_DEF,
  parameter int unsigned COMP_W    = vq_pkg::COMP_W_DEF,
  localparam int unsigned IDX_W    = vq_pkg::idx_width(NUM_CODES)
) (
  input  logic                           clk,
  input  logic                           we,
  input  logic [IDX_W-1:0]               waddr,
  input  logic [VEC_LEN-1:0][COMP_W-1:0] wdata,
  input  logic [IDX_W-1:0]               raddr,
  output logic [VEC_LEN-1:0][COMP_W-1:0] rdata
);

  logic [VEC_LEN-1:0][COMP_W-1:0] mem [NUM_CODES];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < NUM_CODES)) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];

endmodule
