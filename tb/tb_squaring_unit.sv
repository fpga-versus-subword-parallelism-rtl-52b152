// tb_squaring_unit: exhaustive check of the squarer over every difference two
// bytes can produce (-255..255), against the integer square.
module tb_squaring_unit;
  int checks = 0, failures = 0;
  logic signed [8:0]  x;
  logic        [15:0] sq;

  squaring_unit #(.IN_W(9)) dut (.x(x), .sq(sq));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -255; v <= 255; v++) begin
      x = 9'(v);
      #1;
      checks++;
      if (int'(sq) != v * v) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d sq=%0d", v, sq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
