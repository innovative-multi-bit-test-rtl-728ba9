// tb_tpg_feedback_mux: exhaustive testbench for the LFSR feedback mux logic.
//
// For every selection and every 7-bit chain state it checks the feedback bit
// against stage k XOR stage n of x^n + x^k + 1, with the four polynomials
// x^4+x+1, x^5+x^2+1, x^6+x+1 and x^7+x+1 written out here independently.
module tb_tpg_feedback_mux;
  import tpg_pkg::*;

  lfsr_sel_e  sel;
  logic [6:0] q;
  logic       fb;
  int         checks = 0, failures = 0;
  logic       clk = 1'b0;

  tpg_feedback_mux #(.W(7)) u_dut (.sel(sel), .q(q), .fb(fb));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len_of [4] = '{4, 5, 6, 7};
    int tap_of [4] = '{1, 2, 1, 1};
    for (int s = 0; s < 4; s++) begin
      for (int v = 0; v < 128; v++) begin
        logic exp;
        sel = lfsr_sel_e'(s);
        q   = 7'(v);
        #1;
        exp = q[tap_of[s] - 1] ^ q[len_of[s] - 1];
        checks++;
        if (fb !== exp) begin
          failures++;
          $display("sel=%0d q=%b: fb=%b expected %b", s, q, fb, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
