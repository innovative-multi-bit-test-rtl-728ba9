// tpg_ctrl: control logic of the multi-bit test pattern generator.
//
// It registers the length selection {s1,s0} in a flip-flop, holds the
// selection the LFSR is running with, and restarts the LFSR when the two
// differ: for one cycle it raises load, the flip-flop chain takes the seed and
// the running selection takes the new value at the same clock edge. Restarting
// from a fixed seed keeps a shorter LFSR from being left in its all-zero state,
// from which it would never leave, after a switch of length.
//
// Timing: {s1,s0} changes before edge t; load is high between edges t and t+1;
// from edge t+1 on the chain holds the seed and runs the new LFSR. At reset the
// selection is taken directly, without a load cycle.
//
// Choosing the LFSR by s1/s0 through control logic follows the original
// design; the request register, the change detection and the reseed are this
// design's reading of it.
module tpg_ctrl
  import tpg_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      s1,
  input  logic      s0,
  output lfsr_sel_e sel,
  output logic      load
);

  lfsr_sel_e req_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      req_q  <= lfsr_sel_e'({s1, s0});
      sel    <= lfsr_sel_e'({s1, s0});
    end else begin
      req_q  <= lfsr_sel_e'({s1, s0});
      if (load) sel <= req_q;
    end
  end

  assign load = !rst && (req_q != sel);

  // After a load the running selection is the one that was requested.
  a_load_takes_request : assert property (
    @(posedge clk) disable iff (rst) load |=> (sel == $past(req_q))
  );

endmodule
