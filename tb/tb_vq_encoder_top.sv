// tb_vq_encoder_top: end-to-end test of the VQ encoder at its default size
// (32 codewords of 16 bytes).
//
// A codebook is written through the load port and input vectors are encoded.
// For every accepted start the testbench computes, with its own copy of the
// codebook, every squared distance and the lowest index holding the minimum;
// a monitor pops these expectations on each done pulse and checks index,
// distance and latency (NUM_CODES+1 = 33 clock edges from the start edge,
// one codeword per clock). During back-to-back starts the spacing of done
// pulses must be NUM_CODES = 32 cycles, one input vector per codebook scan.
//
// Mechanisms exercised and counted (a count of zero is a failure): results,
// ties between identical codewords (lowest index must win), exact matches
// (distance 0), minimum at the first and at the last codeword, the largest
// possible distance, starts ignored while busy, in_vec changing during a scan
// (it must have been latched), back-to-back starts, and codebook reloads.
module tb_vq_encoder_top;
  localparam int N = 32;
  localparam int L = 16;

  typedef logic [L-1:0][7:0] vec_t;
  typedef struct packed {
    logic [4:0]  idx;
    logic [19:0] sqd;
    int          accept_cyc;
    bit          b2b;          // accepted while the previous vector was in flight
  } expect_t;

  int checks = 0, failures = 0;
  int n_done = 0, n_tie = 0, n_exact = 0, n_first = 0, n_last = 0, n_maxdist = 0;
  int n_ignored = 0, n_vec_change = 0, n_b2b = 0, n_reload = 0;

  logic        clk = 1'b0, rst_n;
  logic        cb_we, start;
  logic [4:0]  cb_waddr;
  vec_t        cb_wdata, in_vec;
  logic        busy, done;
  logic [4:0]  min_index;
  logic [19:0] min_dist;

  vec_t    cb_model [N];
  expect_t exp_q [$];
  int      cyc = 0;
  int      last_done_cyc = -1000;
  bit      measure_rate = 1'b0;
  int      n_rate = 0;

  vq_encoder_top dut (
    .clk(clk), .rst_n(rst_n),
    .cb_we(cb_we), .cb_waddr(cb_waddr), .cb_wdata(cb_wdata),
    .start(start), .in_vec(in_vec),
    .busy(busy), .done(done), .min_index(min_index), .min_dist(min_dist));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic vec_t rand_vec();
    vec_t v;
    for (int k = 0; k < L; k++) v[k] = 8'($urandom);
    return v;
  endfunction

  function automatic int unsigned sqdist(vec_t a, vec_t b);
    int unsigned s = 0;
    for (int k = 0; k < L; k++) begin
      int d = int'(a[k]) - int'(b[k]);
      s += d * d;
    end
    return s;
  endfunction

  // Reference search: lowest index among the minimum distances.
  function automatic expect_t reference(vec_t v);
    expect_t e;
    int unsigned best = sqdist(v, cb_model[0]);
    int bi = 0, nbest = 1;
    for (int i = 1; i < N; i++) begin
      int unsigned d = sqdist(v, cb_model[i]);
      if (d < best) begin best = d; bi = i; nbest = 1; end
      else if (d == best) nbest++;
    end
    e.idx = 5'(bi);
    e.sqd = 20'(best);
    e.accept_cyc = 0;
    e.b2b = 1'b0;
    if (nbest > 1) n_tie++;
    if (best == 0) n_exact++;
    if (bi == 0) n_first++;
    if (bi == N - 1) n_last++;
    if (best == 16 * 255 * 255) n_maxdist++;
    return e;
  endfunction

  // Monitor: one expectation per done pulse, checked half a cycle after it rises.
  always @(negedge clk) begin
    if (rst_n && done) begin
      expect_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL done without a pending request at cycle %0d", cyc);
      end else begin
        e = exp_q.pop_front();
        n_done++;
        if (measure_rate && e.b2b) begin
          checks++;
          n_rate++;
          if (cyc - last_done_cyc != N) begin
            failures++;
            $display("FAIL back-to-back results %0d cycles apart, expected %0d", cyc - last_done_cyc, N);
          end
        end
        last_done_cyc = cyc;
        if (min_index !== e.idx || min_dist !== e.sqd) begin
          failures++;
          if (failures < 10) $display("FAIL result idx=%0d dist=%0d exp idx=%0d dist=%0d",
                                      min_index, min_dist, e.idx, e.sqd);
        end
        checks++;
        if (cyc - e.accept_cyc != N + 1) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d cycles, expected %0d", cyc - e.accept_cyc, N + 1);
        end
      end
    end
  end

  task automatic load_entry(input int i, input vec_t v);
    cb_we = 1'b1; cb_waddr = 5'(i); cb_wdata = v;
    cb_model[i] = v;
    @(negedge clk);
    cb_we = 1'b0;
  endtask

  task automatic load_random_codebook();
    for (int i = 0; i < N; i++) load_entry(i, rand_vec());
  endtask

  // Issue one vector as soon as the encoder is free; while the scan runs,
  // optionally scramble in_vec and poke start (both must have no effect).
  task automatic issue(input vec_t v, input bit disturb);
    expect_t e;
    while (busy) @(negedge clk);
    start = 1'b1; in_vec = v;
    e = reference(v);
    e.b2b = (exp_q.size() != 0);
    if (e.b2b) n_b2b++;
    e.accept_cyc = cyc + 1;
    exp_q.push_back(e);
    @(negedge clk);
    start = 1'b0;
    while (busy) begin
      if (disturb) begin
        in_vec = rand_vec();
        n_vec_change++;
        if ($urandom % 4 == 0) begin
          start = 1'b1;
          n_ignored++;
        end
      end
      @(negedge clk);
      start = 1'b0;
    end
  endtask

  task automatic drain();
    while (exp_q.size() != 0) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; cb_we = 1'b0; cb_waddr = '0; cb_wdata = '0; start = 1'b0; in_vec = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("FAIL busy/done after reset"); end

    // 1. random codebook, random vectors, one at a time, with disturbance
    load_random_codebook();
    n_reload++;
    repeat (40) begin
      issue(rand_vec(), 1'b1);
      drain();
    end

    // 2. exact matches, including the first and the last codeword
    issue(cb_model[0], 1'b0);  drain();
    issue(cb_model[N-1], 1'b0); drain();
    for (int i = 0; i < 8; i++) begin
      int j;
      vec_t v;
      j = int'($urandom % N);
      v = cb_model[j];
      issue(v, 1'b1);
      drain();
    end

    // 3. ties: duplicate codewords, the lower index must win
    for (int t = 0; t < 6; t++) begin
      int lo, hi;
      vec_t v;
      lo = int'($urandom % (N / 2));
      hi = N / 2 + int'($urandom % (N / 2));
      load_entry(hi, cb_model[lo]);
      v = cb_model[lo];
      v[0] = v[0] ^ 8'h01;
      issue(v, 1'b0);
      drain();
    end
    n_reload++;

    // 4. back-to-back starts
    measure_rate = 1'b1;
    for (int i = 0; i < 20; i++) issue(rand_vec(), 1'b0);
    drain();
    measure_rate = 1'b0;

    // 5. reload with a clustered codebook and encode near its entries
    for (int i = 0; i < N; i++) begin
      vec_t c;
      for (int k = 0; k < L; k++) c[k] = 8'(i * 8 + ($urandom % 3));
      load_entry(i, c);
    end
    n_reload++;
    for (int i = 0; i < 20; i++) begin
      vec_t v;
      int j;
      j = int'($urandom % N);
      for (int k = 0; k < L; k++) v[k] = 8'(j * 8 + ($urandom % 5));
      issue(v, 1'b1);
    end
    drain();

    // 6. largest distance: all-zero codebook, all-255 vector
    for (int i = 0; i < N; i++) load_entry(i, '0);
    n_reload++;
    issue('1, 1'b0);
    drain();

    begin
      string names [10] = '{"full-rate result pairs", "results", "ties", "exact matches", "min at first codeword",
                            "min at last codeword", "largest distance", "starts ignored while busy",
                            "input changed during scan", "back-to-back starts"};
      int counts [10];
      counts = '{n_rate, n_done, n_tie, n_exact, n_first, n_last, n_maxdist, n_ignored, n_vec_change, n_b2b};
      for (int i = 0; i < 10; i++) begin
        $display("  %-28s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism never exercised: %s", names[i]); end
      end
      $display("  %-28s %0d", "codebook loads", n_reload);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
