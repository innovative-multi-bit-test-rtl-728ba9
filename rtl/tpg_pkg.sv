// tpg_pkg: types and constants shared by the multi-bit test pattern generator.
//
// The generator runs one of four maximal-length LFSRs, chosen by the two select
// lines {s1,s0}. Each LFSR has a two-term feedback polynomial x^n + x^k + 1:
//   x^4 + x + 1,  x^5 + x^2 + 1,  x^6 + x + 1,  x^7 + x + 1.
// Stages are numbered 1..n. Stage 1 takes (stage k XOR stage n) and every
// other stage takes the one before it. The polynomials and this tap placement
// follow the original design; the encoding of {s1,s0} (00 = 4 bits up to
// 11 = 7 bits) and the seed (stage 1 = 1, all others 0) are this design's choice.
package tpg_pkg;

  // Longest LFSR the generator can run: the length of the flip-flop chain.
  localparam int unsigned MAX_W = 7;

  // Length selection carried by {s1,s0}.
  typedef enum logic [1:0] {
    SEL_4BIT = 2'b00,
    SEL_5BIT = 2'b01,
    SEL_6BIT = 2'b10,
    SEL_7BIT = 2'b11
  } lfsr_sel_e;

  // Feedback configuration of one LFSR: its length n and the middle tap k of
  // x^n + x^k + 1, both as 1-based stage numbers.
  typedef struct packed {
    logic [2:0] len;
    logic [2:0] tap;
  } lfsr_cfg_t;

  // Polynomial table.
  function automatic lfsr_cfg_t sel_to_cfg(lfsr_sel_e sel);
    lfsr_cfg_t cfg;
    unique case (sel)
      SEL_4BIT: cfg = '{len: 3'd4, tap: 3'd1};
      SEL_5BIT: cfg = '{len: 3'd5, tap: 3'd2};
      SEL_6BIT: cfg = '{len: 3'd6, tap: 3'd1};
      SEL_7BIT: cfg = '{len: 3'd7, tap: 3'd1};
      default:  cfg = '{len: 3'd4, tap: 3'd1};
    endcase
    return cfg;
  endfunction

  // Seed loaded at reset and on every change of length: stage 1 set, all
  // others clear. It is a non-zero state of every one of the four LFSRs.
  localparam logic [MAX_W-1:0] SEED = MAX_W'(1);

endpackage
