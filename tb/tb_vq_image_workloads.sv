// tb_vq_image_workloads: the image-coding configurations used to evaluate VQ
// encoding, run on the encoder with its sizes set to match:
//   case 1 / case 3 : 256 codewords, 2x2 blocks (the two differ only in image size)
//   case 2          : 1024 codewords, 2x2 blocks
//   case 4          : 256 codewords, 4x4 blocks
// Each runs on a 128x128 tile of a synthetic image rather than the full
// 512x512 or 1024x1024 image, to keep the simulation short; the encoder
// streams blocks, so image size changes only the run length, at NUM_CODES
// cycles per block. Every result and the block rate are checked.
module tb_vq_image_workloads;
  logic clk = 1'b0;
  logic fin [3];
  int   chk [3];
  int   fl  [3];
  int   checks, failures;

  always #5 clk = ~clk;

  vq_image_runner #(.NUM_CODES(256),  .BLK(2), .IMG_W(128), .IMG_H(128), .NAME("case 1/3"))
    u_case1 (.clk(clk), .finished(fin[0]), .checks(chk[0]), .failures(fl[0]));
  vq_image_runner #(.NUM_CODES(1024), .BLK(2), .IMG_W(128), .IMG_H(128), .NAME("case 2"))
    u_case2 (.clk(clk), .finished(fin[1]), .checks(chk[1]), .failures(fl[1]));
  vq_image_runner #(.NUM_CODES(256),  .BLK(4), .IMG_W(128), .IMG_H(128), .NAME("case 4"))
    u_case4 (.clk(clk), .finished(fin[2]), .checks(chk[2]), .failures(fl[2]));

  initial begin : watchdog
    repeat (6000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2],
             fl[0] + fl[1] + fl[2] + 1);
    $finish;
  end

  initial begin
    #1;
    wait (fin[0] && fin[1] && fin[2]);
    checks = chk[0] + chk[1] + chk[2];
    failures = fl[0] + fl[1] + fl[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
