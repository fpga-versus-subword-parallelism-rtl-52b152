// tb_codebook_storage: fills all 32 codewords with random data through the
// write port, then reads every address back and compares with a copy kept in
// the testbench. Also checks that a cycle with we low leaves the memory alone
// and that a rewrite of one codeword touches no other.
module tb_codebook_storage;
  int checks = 0, failures = 0;
  logic             clk = 1'b0;
  logic             we;
  logic [4:0]       waddr, raddr;
  logic [15:0][7:0] wdata, rdata;
  logic [15:0][7:0] model [32];

  codebook_storage #(.NUM_CODES(32), .VEC_LEN(16), .COMP_W(8)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  function automatic logic [15:0][7:0] rand_vec();
    logic [15:0][7:0] v;
    for (int k = 0; k < 16; k++) v[k] = 8'($urandom);
    return v;
  endfunction

  task automatic read_all(input string what);
    for (int i = 0; i < 32; i++) begin
      raddr = 5'(i);
      #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s addr %0d got %h exp %h", what, i, rdata, model[i]);
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
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    @(negedge clk);
    for (int i = 0; i < 32; i++) begin
      we = 1'b1; waddr = 5'(i); wdata = rand_vec(); model[i] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    read_all("fill");
    // we low: no write
    waddr = 5'd7; wdata = ~model[7];
    @(negedge clk);
    read_all("we low");
    // overwrite one entry
    we = 1'b1; waddr = 5'd19; wdata = rand_vec(); model[19] = wdata;
    @(negedge clk);
    we = 1'b0;
    read_all("rewrite");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
