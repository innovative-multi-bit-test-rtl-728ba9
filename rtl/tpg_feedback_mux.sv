// tpg_feedback_mux: the mux logic and XOR gate that close the LFSR loop.
//
// From the selection {s1,s0} it looks up the polynomial x^n + x^k + 1 of the
// selected LFSR, picks stage k and stage n out of the flip-flop chain with two
// multiplexers and XORs them into the feedback bit for stage 1. Purely
// combinational.
//
// The polynomials, the select-driven mux logic and the XOR gate follow the
// original design. That the mux is built as two selectors (one for the middle
// tap, one for the last stage) is this design's reading of it.
module tpg_feedback_mux
  import tpg_pkg::*;
#(
  parameter int unsigned W = MAX_W
) (
  input  lfsr_sel_e    sel,
  input  logic [W-1:0] q,
  output logic         fb
);

  lfsr_cfg_t cfg;
  logic      tap_bit;
  logic      last_bit;

  always_comb begin
    cfg      = sel_to_cfg(sel);
    tap_bit  = q[cfg.tap - 3'd1];
    last_bit = q[cfg.len - 3'd1];
    fb       = tap_bit ^ last_bit;
  end

endmodule
