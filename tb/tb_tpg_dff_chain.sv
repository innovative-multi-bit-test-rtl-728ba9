// tb_tpg_dff_chain: self-checking testbench for the LFSR flip-flop chain.
//
// A 7-stage chain is driven with random reset, load, seed and shift_in. A
// shift-register model kept in the testbench predicts the chain after every
// rising edge: reset gives the reset seed, load gives the seed, and otherwise
// the state moves one place up with shift_in entering at stage 1.
module tb_tpg_dff_chain;
  localparam int unsigned W = 7;
  localparam logic [W-1:0] RSEED = 7'b0000001;

  logic         clk = 1'b0;
  logic         rst, load, shift_in;
  logic [W-1:0] seed, q, model;
  int           checks = 0, failures = 0;

  tpg_dff_chain #(.W(W), .RST_SEED(RSEED)) u_dut (
    .clk(clk), .rst(rst), .load(load), .seed(seed), .shift_in(shift_in), .q(q)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_load = 0, n_shift = 0;
    rst = 1'b1; load = 1'b0; seed = '0; shift_in = 1'b0;
    model = RSEED;
    @(posedge clk); #1;
    checks++;
    if (q !== RSEED) begin failures++; $display("reset: q=%b", q); end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      rst      = ($urandom_range(0, 49) == 0);
      load     = ($urandom_range(0, 9) == 0);
      seed     = W'($urandom);
      shift_in = 1'($urandom);
      if (rst)       model = RSEED;
      else if (load) begin model = seed; n_load++; end
      else begin
        for (int b = W - 1; b > 0; b--) model[b] = model[b-1];
        model[0] = shift_in;
        n_shift++;
      end
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin failures++; $display("cycle %0d: q=%b expected %b", i, q, model); end
    end
    checks++;
    if (n_load == 0 || n_shift == 0) begin failures++; $display("load or shift never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
