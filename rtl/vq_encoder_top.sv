// vq_encoder_top: full-search vector-quantization encoder.
//
// Given an input vector, it finds the codeword of the stored codebook with the
// smallest squared Euclidean distance and outputs that codeword's index. The
// distance of one codeword is computed per clock cycle, with all VEC_LEN
// components subtracted and squared in parallel; the codebook itself is
// scanned sequentially. The structure follows the original FPGA design:
//
//   codebook_storage --> euclidean_distance_unit --> temporary_distance_storage
//          ^                    ^ input vector                |
//          |                                                  v
//   code_selection_counter (addresses both)          distance_comparison_unit
//                                                             |
//                                                  minimum-distance index
//
// Timing (this design's sequencing; the original only says the comparison
// starts once all distances are stored):
//   cycle 0            start sampled while idle; in_vec is latched; busy rises
//   cycles 1..N        counter = 0..N-1; distance to codeword i is computed
//                      combinationally and written into register i
//   cycle N+1          done pulses for one cycle; min_index/min_dist hold the
//                      result of the comparison tree until the next done
// so a result appears NUM_CODES+1 = 33 clock edges after start. busy is high
// while a start would be ignored: during the scan except its last cycle. A
// start given in the last scan cycle is taken at once, so back-to-back vectors
// are encoded one every NUM_CODES = 32 cycles, the scan of the next vector
// overlapping the comparison of the previous one (the comparison reads the
// distance registers in the cycle before the new scan overwrites the first).
// The longest path (codebook read, subtract, square, add, register) sets the
// clock period.
//
// Codebook loading (cb_we/cb_waddr/cb_wdata) is this design's addition: the
// codebook is trained elsewhere and written in before encoding. It should not
// be written while busy. min_dist is brought out besides the index.
module vq_encoder_top #(
  parameter int unsigned NUM_CODES = vq_pkg::NUM_CODES_DEF,
  parameter int unsigned VEC_LEN   = vq_pkg::VEC_LEN_DEF,
  parameter int unsigned COMP_W    = vq_pkg::COMP_W_DEF,
  localparam int unsigned IDX_W    = vq_pkg::idx_width(NUM_CODES),
  localparam int unsigned DIST_W   = vq_pkg::dist_width(COMP_W, VEC_LEN)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // codebook load port
  input  logic                           cb_we,
  input  logic [IDX_W-1:0]               cb_waddr,
  input  logic [VEC_LEN-1:0][COMP_W-1:0] cb_wdata,
  // encode request
  input  logic                           start,
  input  logic [VEC_LEN-1:0][COMP_W-1:0] in_vec,
  // result
  output logic                           busy,
  output logic                           done,
  output logic [IDX_W-1:0]               min_index,
  output logic [DIST_W-1:0]              min_dist
);

  logic                           scan_running;
  logic                           scan_last;
  logic [IDX_W-1:0]               code_sel;
  logic [VEC_LEN-1:0][COMP_W-1:0] in_vec_q;
  logic [VEC_LEN-1:0][COMP_W-1:0] codeword;
  logic [DIST_W-1:0]              cur_dist;
  logic [NUM_CODES-1:0][DIST_W-1:0] dists;
  logic                           compare_q;   // all distances stored: compare now
  logic [DIST_W-1:0]              tree_dist;
  logic [IDX_W-1:0]               tree_idx;
  logic                           start_ok;

  assign start_ok = start && !busy;

  code_selection_counter #(.NUM_CODES(NUM_CODES)) u_counter (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start_ok),
    .running (scan_running),
    .count   (code_sel),
    .last    (scan_last)
  );

  codebook_storage #(.NUM_CODES(NUM_CODES), .VEC_LEN(VEC_LEN), .COMP_W(COMP_W)) u_codebook (
    .clk   (clk),
    .we    (cb_we),
    .waddr (cb_waddr),
    .wdata (cb_wdata),
    .raddr (code_sel),
    .rdata (codeword)
  );

  euclidean_distance_unit #(.VEC_LEN(VEC_LEN), .COMP_W(COMP_W)) u_distance (
    .in_vec  (in_vec_q),
    .cw_vec  (codeword),
    .sq_dist (cur_dist)
  );

  temporary_distance_storage #(.NUM_CODES(NUM_CODES), .DIST_W(DIST_W)) u_dist_store (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (scan_running),
    .waddr (code_sel),
    .wdist (cur_dist),
    .dists (dists)
  );

  distance_comparison_unit #(.NUM_CODES(NUM_CODES), .DIST_W(DIST_W)) u_compare (
    .dists    (dists),
    .min_dist (tree_dist),
    .min_idx  (tree_idx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_vec_q  <= '0;
      compare_q <= 1'b0;
      done      <= 1'b0;
      min_index <= '0;
      min_dist  <= '0;
    end else begin
      if (start_ok) begin
        in_vec_q <= in_vec;
      end
      compare_q <= scan_last;
      done      <= compare_q;
      if (compare_q) begin
        min_index <= tree_idx;
        min_dist  <= tree_dist;
      end
    end
  end

  assign busy = scan_running && !scan_last;

  a_no_load_while_busy : assert property (@(posedge clk) disable iff (!rst_n)
    scan_running |-> !cb_we);

endmodule
