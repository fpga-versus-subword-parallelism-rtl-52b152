// tb_euclidean_distance_unit: squared distance between two 16-byte vectors,
// checked against a sum of squared integer differences. Covers identical
// vectors (distance 0), the largest distance (all 0 against all 255, both
// ways round), single-lane differences in every lane, and random vectors.
module tb_euclidean_distance_unit;
  int checks = 0, failures = 0;
  logic [15:0][7:0] in_vec, cw_vec;
  logic [19:0]      sq_dist;

  euclidean_distance_unit #(.VEC_LEN(16), .COMP_W(8)) dut (
    .in_vec(in_vec), .cw_vec(cw_vec), .sq_dist(sq_dist));

  task automatic check(input string what);
    int unsigned e = 0;
    for (int k = 0; k < 16; k++) begin
      int d = int'(in_vec[k]) - int'(cw_vec[k]);
      e += d * d;
    end
    #1;
    checks++;
    if (sq_dist != 20'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, sq_dist, e);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_vec = '0; cw_vec = '0; check("zero");
    in_vec = '0; cw_vec = '1; check("max a<b");
    in_vec = '1; cw_vec = '0; check("max a>b");
    for (int k = 0; k < 16; k++) begin
      in_vec = '0; cw_vec = '0;
      in_vec[k] = 8'(10 + k);
      check("lane in");
      in_vec = '0; cw_vec[k] = 8'(200 - k);
      check("lane cw");
    end
    repeat (1000) begin
      for (int k = 0; k < 16; k++) begin
        in_vec[k] = 8'($urandom);
        cw_vec[k] = 8'($urandom);
      end
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
