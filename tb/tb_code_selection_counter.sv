// tb_code_selection_counter: checks the scan sequence. After reset the counter
// idles at 0; a start gives exactly 32 running cycles counting 0..31, with
// last high only on 31; a start during a scan is ignored, except in the last
// cycle, where it chains a second scan with no idle cycle between (64 running
// cycles, counting 0..31 twice); after a scan it idles again.
module tb_code_selection_counter;
  int checks = 0, failures = 0;
  logic       clk = 1'b0, rst_n, start;
  logic       running, last;
  logic [4:0] count;

  code_selection_counter #(.NUM_CODES(32)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .running(running), .count(count), .last(last));

  always #5 clk = ~clk;

  task automatic expect_state(input logic exp_run, input int exp_cnt, input string what);
    checks++;
    if (running !== exp_run || int'(count) != exp_cnt || last !== (exp_run && exp_cnt == 31)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: running=%0b count=%0d last=%0b exp run=%0b cnt=%0d",
                 what, running, count, last, exp_run, exp_cnt);
    end
  endtask

  task automatic scan(input bit poke_start, input bit chain);
    int cycles = 0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (running && cycles < 100) begin
      expect_state(1'b1, cycles % 32, "scan");
      if (poke_start && cycles == 10) start = 1'b1;   // ignored: already running
      if (chain && cycles == 31) start = 1'b1;         // taken: last cycle
      @(negedge clk);
      start = 1'b0;
      cycles++;
    end
    checks++;
    if (cycles != (chain ? 64 : 32)) begin
      failures++;
      $display("FAIL scan took %0d cycles, expected %0d", cycles, chain ? 64 : 32);
    end
    expect_state(1'b0, 0, "after scan");
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_state(1'b0, 0, "idle");
    repeat (3) @(negedge clk);
    expect_state(1'b0, 0, "still idle");
    scan(1'b0, 1'b0);
    scan(1'b1, 1'b0);
    scan(1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
