// tb_tpg_ctrl: self-checking testbench for the length-select control logic.
//
// Checks that reset takes {s1,s0} directly with no load, that a steady
// selection never raises load, and that a change of {s1,s0} raises load for
// exactly one cycle, one edge after the change, with the running selection
// switching at the edge that ends that cycle. Changes are random, including
// changes back before the previous one has settled.
module tb_tpg_ctrl;
  import tpg_pkg::*;

  logic      clk = 1'b0;
  logic      rst, s1, s0, load;
  lfsr_sel_e sel;
  int        checks = 0, failures = 0;

  tpg_ctrl u_dut (.clk(clk), .rst(rst), .s1(s1), .s0(s0), .sel(sel), .load(load));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("%t: %s", $time, msg); end
  endtask

  initial begin
    logic [1:0] req_m, sel_m, s_now;
    int         n_loads = 0;
    rst = 1'b1; {s1, s0} = 2'b10;
    @(posedge clk); @(posedge clk); #1;
    check(sel == lfsr_sel_e'(2'b10), "reset did not take {s1,s0}");
    @(negedge clk);
    rst = 1'b0;
    #1;
    check(load == 1'b0, "load high right after reset");
    req_m = 2'b10; sel_m = 2'b10;
    for (int i = 0; i < 600; i++) begin
      // Hold the selection for a random time, sometimes only one cycle.
      s_now = ($urandom_range(0, 2) == 0) ? 2'($urandom) : {s1, s0};
      {s1, s0} = s_now;
      // Model: load is combinational on (request register != running select).
      #1;
      check(load == (req_m != sel_m), $sformatf("load=%b, request %b running %b", load, req_m, sel_m));
      check(sel == lfsr_sel_e'(sel_m), $sformatf("sel=%b expected %b", sel, sel_m));
      if (load) n_loads++;
      @(posedge clk);
      if (req_m != sel_m) sel_m = req_m;
      req_m = s_now;
      @(negedge clk);
    end
    check(n_loads > 20, "too few selection changes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
