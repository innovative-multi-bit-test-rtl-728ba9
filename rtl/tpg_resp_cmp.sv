// tpg_resp_cmp: response comparator for the circuit under test.
//
// For every pattern applied while en is high it compares the actual output of
// the circuit under test (vout) with the calculated, fault-free output
// (vout_ref). A difference means the circuit may hold a defect. mismatch
// reports the last comparison, fail stays high from the first difference until
// reset, and count tallies the differences, stopping at its maximum.
//
// Timing: vout and vout_ref are sampled at the rising edge that ends the
// pattern's cycle; the three outputs show the result from that edge on.
//
// Comparing expected with actual outputs follows the original design; the
// sticky flag and the counter, and their widths, are this design's choice.
module tpg_resp_cmp #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             vout,
  input  logic             vout_ref,
  output logic             mismatch,
  output logic             fail,
  output logic [CNT_W-1:0] count
);

  logic diff;
  assign diff = en && (vout != vout_ref);

  always_ff @(posedge clk) begin
    if (rst) begin
      mismatch <= 1'b0;
      fail     <= 1'b0;
      count    <= '0;
    end else begin
      mismatch <= diff;
      if (diff) fail <= 1'b1;
      if (diff && count != '1) count <= count + 1'b1;
    end
  end

endmodule
