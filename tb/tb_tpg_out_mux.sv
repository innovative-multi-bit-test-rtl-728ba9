// tb_tpg_out_mux: exhaustive testbench for the pattern output multiplexers.
//
// For every selection and every 7-bit chain state it checks that the pattern
// holds the chain's low n bits with the rest zero, and that width reports n
// (4, 5, 6 or 7 for {s1,s0} = 00, 01, 10, 11).
module tb_tpg_out_mux;
  import tpg_pkg::*;

  lfsr_sel_e  sel;
  logic [6:0] q, pattern;
  logic [2:0] width;
  int         checks = 0, failures = 0;
  logic       clk = 1'b0;

  tpg_out_mux #(.W(7)) u_dut (.sel(sel), .q(q), .pattern(pattern), .width(width));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int v = 0; v < 128; v++) begin
        logic [6:0] exp;
        int         n;
        sel = lfsr_sel_e'(s);
        q   = 7'(v);
        #1;
        n   = 4 + s;
        exp = q & 7'((1 << n) - 1);
        checks += 2;
        if (pattern !== exp) begin failures++; $display("sel=%0d q=%b: pattern=%b expected %b", s, q, pattern, exp); end
        if (int'(width) != n) begin failures++; $display("sel=%0d: width=%0d expected %0d", s, width, n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
