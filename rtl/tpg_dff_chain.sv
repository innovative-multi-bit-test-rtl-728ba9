// tpg_dff_chain: the D flip-flop chain that holds the LFSR state.
//
// W synchronous D flip-flops in a row. Stage 1 (q[0]) takes shift_in, the
// feedback bit, and stage i+1 (q[i]) takes stage i (q[i-1]), so the state moves
// one place towards the high end on every clock. While load is high the chain
// instead takes seed in parallel; reset puts RST_SEED into it. The chain is
// always as long as the longest LFSR: for a shorter LFSR the stages above its
// length keep shifting but are not used.
//
// The shift chain and its direction follow the original design; the parallel
// load, used to restart the LFSR when its length changes, is this design's
// choice.
//
// Timing: q changes one clock after shift_in, load or seed.
module tpg_dff_chain #(
  parameter int unsigned        W        = tpg_pkg::MAX_W,
  parameter logic [W-1:0]       RST_SEED = W'(1)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         shift_in,
  output logic [W-1:0] q
);

  logic [W-1:0] d;

  always_comb begin
    d[0] = load ? seed[0] : shift_in;
    for (int i = 1; i < W; i++) d[i] = load ? seed[i] : q[i-1];
  end

  for (genvar i = 0; i < W; i++) begin : g_stage
    tpg_dff #(.RST_VAL(RST_SEED[i])) u_dff (
      .clk(clk),
      .rst(rst),
      .d  (d[i]),
      .q  (q[i])
    );
  end

endmodule
