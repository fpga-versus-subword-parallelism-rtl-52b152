// tb_distance_comparison_unit: the comparison tree at 32 inputs and at a
// non-power-of-two size (20 inputs). For each pattern a linear search in the
// testbench gives the expected minimum and the lowest index that holds it.
// Covers a unique minimum placed at every position, all-equal inputs, ties
// between two positions, and random patterns with small values (many ties).
module tb_distance_comparison_unit;
  int checks = 0, failures = 0;
  logic [31:0][19:0] d32;
  logic [19:0][19:0] d20;
  logic [19:0]       m32, m20;
  logic [4:0]        i32, i20;

  distance_comparison_unit #(.NUM_CODES(32), .DIST_W(20)) dut32 (
    .dists(d32), .min_dist(m32), .min_idx(i32));
  distance_comparison_unit #(.NUM_CODES(20), .DIST_W(20)) dut20 (
    .dists(d20), .min_dist(m20), .min_idx(i20));

  task automatic check(input string what);
    int bi32 = 0, bi20 = 0;
    for (int i = 1; i < 32; i++) if (d32[i] < d32[bi32]) bi32 = i;
    for (int i = 1; i < 20; i++) if (d20[i] < d20[bi20]) bi20 = i;
    #1;
    checks += 2;
    if (m32 !== d32[bi32] || int'(i32) != bi32) begin
      failures++;
      if (failures < 10) $display("FAIL %s N=32 got %0d@%0d exp %0d@%0d", what, m32, i32, d32[bi32], bi32);
    end
    if (m20 !== d20[bi20] || int'(i20) != bi20) begin
      failures++;
      if (failures < 10) $display("FAIL %s N=20 got %0d@%0d exp %0d@%0d", what, m20, i20, d20[bi20], bi20);
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
    d32 = '1; d20 = '1; check("all max");
    d32 = '0; d20 = '0; check("all zero");
    for (int p = 0; p < 32; p++) begin
      for (int i = 0; i < 32; i++) d32[i] = 20'(5000 + $urandom % 1000);
      for (int i = 0; i < 20; i++) d20[i] = 20'(5000 + $urandom % 1000);
      d32[p] = 20'(100 + p);
      d20[p % 20] = 20'(100 + p);
      check("unique min");
      d32[31 - p] = d32[p];           // tie with a second position
      d20[19 - (p % 20)] = d20[p % 20];
      check("tie");
    end
    repeat (500) begin
      for (int i = 0; i < 32; i++) d32[i] = 20'($urandom % 8);
      for (int i = 0; i < 20; i++) d20[i] = 20'($urandom % 8);
      check("small random");
      for (int i = 0; i < 32; i++) d32[i] = 20'($urandom);
      for (int i = 0; i < 20; i++) d20[i] = 20'($urandom);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
