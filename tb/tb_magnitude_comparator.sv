// tb_magnitude_comparator: random and boundary pairs; the smaller distance and
// its index must come out, and on equal distances input a must win.
module tb_magnitude_comparator;
  int checks = 0, failures = 0, ties = 0;
  logic [19:0] a_dist, b_dist, min_dist;
  logic [4:0]  a_idx, b_idx, min_idx;

  magnitude_comparator #(.DIST_W(20), .IDX_W(5)) dut (
    .a_dist(a_dist), .a_idx(a_idx), .b_dist(b_dist), .b_idx(b_idx),
    .min_dist(min_dist), .min_idx(min_idx));

  task automatic check();
    logic [19:0] ed;
    logic [4:0]  ei;
    if (b_dist < a_dist) begin ed = b_dist; ei = b_idx; end
    else begin ed = a_dist; ei = a_idx; end
    if (a_dist == b_dist) ties++;
    #1;
    checks++;
    if (min_dist !== ed || min_idx !== ei) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d/%0d b=%0d/%0d got %0d/%0d",
                                  a_dist, a_idx, b_dist, b_idx, min_dist, min_idx);
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
    a_dist = 0; b_dist = 0; a_idx = 3; b_idx = 4; check();
    a_dist = '1; b_dist = '1; check();
    a_dist = 1; b_dist = 0; check();
    a_dist = 0; b_dist = 1; check();
    a_dist = 20'h80000; b_dist = 20'h7ffff; check();
    repeat (1000) begin
      a_idx = 5'($urandom); b_idx = 5'($urandom);
      a_dist = 20'($urandom);
      b_dist = ($urandom % 4 == 0) ? a_dist : 20'($urandom);
      check();
    end
    checks++;
    if (ties < 10) begin failures++; $display("FAIL too few ties: %0d", ties); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
