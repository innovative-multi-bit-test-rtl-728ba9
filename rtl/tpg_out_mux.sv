// tpg_out_mux: output multiplexers that present the selected LFSR as the test
// pattern.
//
// For the length n chosen by {s1,s0} it passes stages 1..n of the chain to
// pattern[n-1:0] (pattern[0] is stage 1, the first input A of the circuit under
// test) and forces pattern bits n and above to 0, so a circuit with fewer inputs
// sees only its own LFSR. It also reports n on width. Purely combinational.
//
// Selecting the pattern by {s1,s0} follows the original design; zeroing the
// unused bits is this design's choice.
module tpg_out_mux
  import tpg_pkg::*;
#(
  parameter int unsigned W = MAX_W
) (
  input  lfsr_sel_e    sel,
  input  logic [W-1:0] q,
  output logic [W-1:0] pattern,
  output logic [2:0]   width
);

  always_comb begin
    width = sel_to_cfg(sel).len;
    for (int i = 0; i < W; i++) pattern[i] = (i < int'(width)) ? q[i] : 1'b0;
  end

endmodule
