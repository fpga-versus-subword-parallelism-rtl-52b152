// code_selection_counter: steps through the codebook, one codeword per clock.
//
// Its count addresses the codebook and also selects the temporary storage
// register that receives the distance, as in the original design. The start
// and stop control is this design's choice: the counter idles at zero; a start
// pulse makes it run 0, 1, ..., NUM_CODES-1, one value per cycle, with
// `running` high, and it stops after the last value. `last` marks the cycle
// in which the final codeword is examined; a start in that cycle wraps the
// count straight back to 0, so back-to-back scans leave no idle cycle. A start
// in any other running cycle is ignored.
//
//   start   : begin a scan (taken when idle or in the last cycle)
//   running : count is valid this cycle
//   count   : IDX_W-bit codeword index (5 bits for 32 codewords)
//   last    : running and count == NUM_CODES-1
module code_selection_counter #(
  parameter int unsigned NUM_CODES = vq_pkg::NUM_CODES_DEF,
  localparam int unsigned IDX_W    = vq_pkg::idx_width(NUM_CODES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             running,
  output logic [IDX_W-1:0] count,
  output logic             last
);

  localparam logic [IDX_W-1:0] LAST_IDX = IDX_W'(NUM_CODES - 1);

  assign last = running && (count == LAST_IDX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      count   <= '0;
    end else if (running) begin
      if (count == LAST_IDX) begin
        running <= start;
        count   <= '0;
      end else begin
        count <= count + 1'b1;
      end
    end else if (start) begin
      running <= 1'b1;
      count   <= '0;
    end
  end

  a_count_in_range : assert property (@(posedge clk) disable iff (!rst_n)
    32'(count) < NUM_CODES);
  a_idle_at_zero : assert property (@(posedge clk) disable iff (!rst_n)
    !running |-> count == '0);

endmodule
