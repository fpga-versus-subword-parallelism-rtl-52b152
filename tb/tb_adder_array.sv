// tb_adder_array: the adder tree at its default size (16 terms of 16 bits) and
// at a non-power-of-two size (5 terms), with random terms, all-zero and
// all-maximum terms, and one-hot terms that catch a dropped or doubled input.
module tb_adder_array;
  int checks = 0, failures = 0;
  logic [15:0][15:0] t16;
  logic [19:0]       s16;
  logic [4:0][15:0]  t5;
  logic [18:0]       s5;

  adder_array #(.N(16), .IN_W(16)) dut16 (.terms(t16), .sum(s16));
  adder_array #(.N(5),  .IN_W(16)) dut5  (.terms(t5),  .sum(s5));

  task automatic check(input string what);
    int unsigned e16 = 0, e5 = 0;
    for (int i = 0; i < 16; i++) e16 += t16[i];
    for (int i = 0; i < 5; i++)  e5  += t5[i];
    #1;
    checks += 2;
    if (s16 != 20'(e16)) begin
      failures++; $display("FAIL %s N=16 got %0d exp %0d", what, s16, e16);
    end
    if (s5 != 19'(e5)) begin
      failures++; $display("FAIL %s N=5 got %0d exp %0d", what, s5, e5);
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
    t16 = '0; t5 = '0; check("zero");
    t16 = '1; t5 = '1; check("max");
    for (int i = 0; i < 16; i++) begin
      t16 = '0; t5 = '0;
      t16[i] = 16'(1 << i);
      if (i < 5) t5[i] = 16'(1000 + i);
      check("onehot");
    end
    repeat (500) begin
      for (int i = 0; i < 16; i++) t16[i] = 16'($urandom);
      for (int i = 0; i < 5; i++)  t5[i]  = 16'($urandom);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
