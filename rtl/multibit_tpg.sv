// multibit_tpg: multi-bit test pattern generator with selectable LFSR length.
//
// A single chain of MAX_W = 7 D flip-flops is closed into a linear feedback
// shift register by an XOR gate fed through mux logic. The select lines s1/s0
// choose which polynomial the mux logic realises, so the same chain runs as a
// 4-, 5-, 6- or 7-bit maximal-length LFSR (x^4+x+1, x^5+x^2+1, x^6+x+1,
// x^7+x+1) and produces 15, 31, 63 or 127 distinct non-zero patterns before it
// repeats. The output multiplexers give the selected LFSR's stages on pattern
// (bit 0 = stage 1 = input A of the circuit under test, unused bits 0). The
// circuit under test is outside this module: its actual output comes back on
// cut_vout and its calculated fault-free output on cut_vout_ref, and the
// response comparator flags and counts every difference.
//
// Timing: one new pattern per clock. After reset the chain holds the seed
// (stage 1 = 1), which is the first pattern. A change of s1/s0 is registered,
// then costs one cycle in which the chain is reseeded; the new LFSR's seed
// pattern appears two edges after s1/s0 changed. While cmp_en is high, the
// response to each pattern is compared, and the result is reported on
// mismatch, fail and mismatch_count from the edge that ends that pattern.
//
// The chain, the mux logic, the XOR feedback, the four polynomials, the control
// logic and the output multiplexers follow the original design; the s1/s0
// encoding (00 = 4 bits ... 11 = 7 bits), the seed, the reseed on a length
// change and the comparator's counter are this design's choices.
module multibit_tpg
  import tpg_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             s1,
  input  logic             s0,
  output logic [MAX_W-1:0] pattern,
  output logic [2:0]       pattern_width,
  input  logic             cmp_en,
  input  logic             cut_vout,
  input  logic             cut_vout_ref,
  output logic             mismatch,
  output logic             fail,
  output logic [CNT_W-1:0] mismatch_count
);

  lfsr_sel_e        sel;
  logic             load;
  logic             fb;
  logic [MAX_W-1:0] q;

  tpg_ctrl u_ctrl (
    .clk   (clk),
    .rst   (rst),
    .s1    (s1),
    .s0    (s0),
    .sel   (sel),
    .load  (load)
  );

  tpg_feedback_mux #(.W(MAX_W)) u_fb_mux (
    .sel(sel),
    .q  (q),
    .fb (fb)
  );

  tpg_dff_chain #(.W(MAX_W), .RST_SEED(SEED)) u_chain (
    .clk     (clk),
    .rst     (rst),
    .load    (load),
    .seed    (SEED),
    .shift_in(fb),
    .q       (q)
  );

  tpg_out_mux #(.W(MAX_W)) u_out_mux (
    .sel    (sel),
    .q      (q),
    .pattern(pattern),
    .width  (pattern_width)
  );

  tpg_resp_cmp #(.CNT_W(CNT_W)) u_cmp (
    .clk     (clk),
    .rst     (rst),
    .en      (cmp_en),
    .vout    (cut_vout),
    .vout_ref(cut_vout_ref),
    .mismatch(mismatch),
    .fail    (fail),
    .count   (mismatch_count)
  );

endmodule
