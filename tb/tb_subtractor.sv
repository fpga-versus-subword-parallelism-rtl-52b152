// tb_subtractor: exhaustive check of the component subtractor.
// Every pair of 8-bit unsigned inputs is applied and the signed 9-bit result is
// compared with the integer difference a - b.
module tb_subtractor;
  int checks = 0, failures = 0;
  logic        [7:0] a, b;
  logic signed [8:0] diff;

  subtractor #(.COMP_W(8)) dut (.a(a), .b(b), .diff(diff));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (int'(diff) != i - j) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d diff=%0d", i, j, diff);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
