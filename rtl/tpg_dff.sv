// tpg_dff: synchronous D flip-flop, the storage element of the LFSR chain.
//
// q takes d on every rising clock edge. The reset is synchronous, as in the
// original design's flip-flop: while rst is high at a rising edge, q takes
// RST_VAL instead. The reset value parameter is this design's addition so that
// the chain can come out of reset holding the LFSR seed.
//
// Interface: clk, rst (active high, synchronous), d -> q. One cycle from d to q.
module tpg_dff #(
  parameter bit RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk) begin
    if (rst) q <= RST_VAL;
    else     q <= d;
  end

endmodule
