// tb_temporary_distance_storage: after reset every register holds the largest
// distance; writes land only in the addressed register; cycles with we low
// change nothing. A model array in the testbench is compared with all 32
// outputs after every cycle.
module tb_temporary_distance_storage;
  int checks = 0, failures = 0;
  logic              clk = 1'b0, rst_n, we;
  logic [4:0]        waddr;
  logic [19:0]       wdist;
  logic [31:0][19:0] dists, model;

  temporary_distance_storage #(.NUM_CODES(32), .DIST_W(20)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdist(wdist), .dists(dists));

  always #5 clk = ~clk;

  task automatic compare(input string what);
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (dists[i] !== model[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s reg %0d got %0d exp %0d", what, i, dists[i], model[i]);
      end
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we = 1'b0; waddr = '0; wdist = '0;
    model = '1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    compare("reset");
    for (int i = 0; i < 32; i++) begin
      we = 1'b1; waddr = 5'(31 - i); wdist = 20'($urandom);
      model[31 - i] = wdist;
      @(negedge clk);
      compare("write");
    end
    repeat (200) begin
      we = 1'($urandom); waddr = 5'($urandom); wdist = 20'($urandom);
      if (we) model[waddr] = wdist;
      @(negedge clk);
      compare("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
