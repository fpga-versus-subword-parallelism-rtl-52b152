// vq_pkg: constants shared by the vector-quantization encoder.
//
// The encoder compares one input vector against a codebook of NUM_CODES
// codewords, each of VEC_LEN unsigned byte components, and reports the index
// of the nearest codeword. The defaults (32 codewords of 16 bytes, a 32 x 128
// bit codebook, a 5-bit index) are the sizes of the original FPGA design.
// The distance width is this design's choice: wide enough that the sum of
// VEC_LEN squared byte differences can never overflow.
package vq_pkg;

  parameter int unsigned NUM_CODES_DEF = 32;  // codewords in the codebook
  parameter int unsigned VEC_LEN_DEF   = 16;  // components per vector (4x4 pixels)
  parameter int unsigned COMP_W_DEF    = 8;   // bits per component (gray-level byte)

  // Width of a squared Euclidean distance: each squared difference needs
  // 2*comp_w bits, and adding vec_len of them needs clog2(vec_len) more.
  function automatic int unsigned dist_width(int unsigned comp_w, int unsigned vec_len);
    return 2 * comp_w + $clog2(vec_len);
  endfunction

  // Width of a codeword index (at least one bit).
  function automatic int unsigned idx_width(int unsigned num_codes);
    return (num_codes > 1) ? $clog2(num_codes) : 1;
  endfunction

endpackage
