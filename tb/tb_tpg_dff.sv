// tb_tpg_dff: self-checking testbench for the synchronous D flip-flop.
//
// Drives random d and rst on the falling edge and checks after every rising
// edge that q took RST_VAL when rst was high and d otherwise. Two instances
// cover both reset values.
module tb_tpg_dff;
  logic clk = 1'b0;
  logic rst, d;
  logic q0, q1;
  int   checks = 0, failures = 0;

  tpg_dff #(.RST_VAL(1'b0)) u_dut0 (.clk(clk), .rst(rst), .d(d), .q(q0));
  tpg_dff #(.RST_VAL(1'b1)) u_dut1 (.clk(clk), .rst(rst), .d(d), .q(q1));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp0, exp1;
    rst = 1'b1;
    d   = 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      rst = ($urandom_range(0, 3) == 0);
      d   = 1'($urandom);
      exp0 = rst ? 1'b0 : d;
      exp1 = rst ? 1'b1 : d;
      @(posedge clk);
      #1;
      checks += 2;
      if (q0 !== exp0) begin failures++; $display("cycle %0d: q0=%b expected %b", i, q0, exp0); end
      if (q1 !== exp1) begin failures++; $display("cycle %0d: q1=%b expected %b", i, q1, exp1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
