// vq_image_runner: encodes a synthetic gray-level image tile with the VQ
// encoder built at a given codebook size and block size, and checks every
// result. Used by tb_vq_image_workloads.
//
// The IMG_W x IMG_H tile is a smooth gradient with texture and noise,
// pix(x,y) = (3x + 5y + (x*y)/8 + noise) mod 256, cut into BLK x BLK blocks
// (one vector each, row-major inside the block). As in common K-means
// initialisation, the codebook is a random choice of blocks of the tile
// itself. All blocks are then encoded back to back; the runner compares each
// index and distance with its own full search (lowest index on ties) and
// checks that results arrive one per NUM_CODES cycles. `finished` rises when
// all blocks are done; `checks`/`failures` are then final.
module vq_image_runner #(
  parameter int unsigned NUM_CODES = 256,
  parameter int unsigned BLK       = 2,
  parameter int unsigned IMG_W     = 64,
  parameter int unsigned IMG_H     = 64,
  parameter string       NAME      = "case"
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned VEC_LEN = BLK * BLK;
  localparam int unsigned IDX_W   = vq_pkg::idx_width(NUM_CODES);
  localparam int unsigned DIST_W  = vq_pkg::dist_width(8, VEC_LEN);
  localparam int unsigned NVEC    = (IMG_W / BLK) * (IMG_H / BLK);

  typedef logic [VEC_LEN-1:0][7:0] vec_t;

  logic              rst_n, cb_we, start, busy, done;
  logic [IDX_W-1:0]  cb_waddr, min_index;
  vec_t              cb_wdata, in_vec;
  logic [DIST_W-1:0] min_dist;

  logic [7:0] img [IMG_H][IMG_W];
  vec_t       blocks [NVEC];
  vec_t       cb_model [NUM_CODES];
  int         exp_idx [NVEC];
  longint     exp_dist [NVEC];
  int         n_out = 0, last_done = 0, cyc = 0, n_exact = 0;
  longint     total_dist = 0;

  vq_encoder_top #(.NUM_CODES(NUM_CODES), .VEC_LEN(VEC_LEN), .COMP_W(8)) dut (
    .clk(clk), .rst_n(rst_n),
    .cb_we(cb_we), .cb_waddr(cb_waddr), .cb_wdata(cb_wdata),
    .start(start), .in_vec(in_vec),
    .busy(busy), .done(done), .min_index(min_index), .min_dist(min_dist));

  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint sqdist(vec_t a, vec_t b);
    longint s = 0;
    for (int k = 0; k < int'(VEC_LEN); k++) begin
      int d = int'(a[k]) - int'(b[k]);
      s += longint'(d * d);
    end
    return s;
  endfunction

  // Result monitor: in order, one per done pulse.
  always @(negedge clk) begin
    if (rst_n && done) begin
      checks++;
      if (n_out >= int'(NVEC)) begin
        failures++;
        $display("%s: FAIL extra result", NAME);
      end else begin
        if (int'(min_index) != exp_idx[n_out] || longint'(min_dist) != exp_dist[n_out]) begin
          failures++;
          if (failures < 5) $display("%s: FAIL block %0d idx=%0d dist=%0d exp idx=%0d dist=%0d",
                                     NAME, n_out, min_index, min_dist, exp_idx[n_out], exp_dist[n_out]);
        end
        total_dist += longint'(min_dist);
        if (min_dist == '0) n_exact++;
        if (n_out > 0) begin
          checks++;
          if (cyc - last_done != int'(NUM_CODES)) begin
            failures++;
            if (failures < 5) $display("%s: FAIL results %0d cycles apart, expected %0d",
                                       NAME, cyc - last_done, NUM_CODES);
          end
        end
      end
      last_done = cyc;
      n_out++;
    end
  end

  initial begin
    finished = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; cb_we = 1'b0; cb_waddr = '0; cb_wdata = '0; start = 1'b0; in_vec = '0;

    // image tile and its blocks
    for (int y = 0; y < int'(IMG_H); y++)
      for (int x = 0; x < int'(IMG_W); x++)
        img[y][x] = 8'(3 * x + 5 * y + (x * y) / 8 + int'($urandom % 9));
    for (int by = 0; by < int'(IMG_H / BLK); by++)
      for (int bx = 0; bx < int'(IMG_W / BLK); bx++)
        for (int r = 0; r < int'(BLK); r++)
          for (int c = 0; c < int'(BLK); c++)
            blocks[by * int'(IMG_W / BLK) + bx][r * int'(BLK) + c] = img[by * int'(BLK) + r][bx * int'(BLK) + c];

    // codebook: random blocks of the tile
    for (int i = 0; i < int'(NUM_CODES); i++) begin
      int pick;
      pick = int'($urandom % NVEC);
      cb_model[i] = blocks[pick];
    end

    // reference search
    for (int n = 0; n < int'(NVEC); n++) begin
      longint best;
      int bi;
      best = sqdist(blocks[n], cb_model[0]);
      bi = 0;
      for (int i = 1; i < int'(NUM_CODES); i++) begin
        longint d;
        d = sqdist(blocks[n], cb_model[i]);
        if (d < best) begin best = d; bi = i; end
      end
      exp_idx[n] = bi;
      exp_dist[n] = best;
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < int'(NUM_CODES); i++) begin
      cb_we = 1'b1; cb_waddr = IDX_W'(i); cb_wdata = cb_model[i];
      @(negedge clk);
    end
    cb_we = 1'b0;

    // stream every block, back to back
    for (int n = 0; n < int'(NVEC); n++) begin
      while (busy) @(negedge clk);
      start = 1'b1; in_vec = blocks[n];
      @(negedge clk);
      start = 1'b0;
    end
    while (n_out < int'(NVEC)) @(negedge clk);
    checks++;
    if (n_exact == 0) begin
      failures++;
      $display("%s: FAIL no block matched a codeword exactly", NAME);
    end
    $display("%s: %0d codewords, %0dx%0d blocks, %0d vectors encoded, %0d exact, mean squared distance per block %0d",
             NAME, NUM_CODES, BLK, BLK, n_out, n_exact, total_dist / longint'(NVEC));
    finished = 1'b1;
  end
endmodule
