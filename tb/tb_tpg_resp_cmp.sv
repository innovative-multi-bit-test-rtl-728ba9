// tb_tpg_resp_cmp: self-checking testbench for the response comparator.
//
// Random actual and expected outputs and a random enable are applied. After
// every edge the registered mismatch, the sticky fail flag and the count are
// checked against a model. A second instance with a 3-bit counter checks that
// the count stops at its maximum instead of wrapping.
module tb_tpg_resp_cmp;
  logic       clk = 1'b0;
  logic       rst, en, vout, vout_ref;
  logic       mismatch, fail, mismatch_s, fail_s;
  logic [15:0] count;
  logic [2:0]  count_s;
  int          checks = 0, failures = 0;

  tpg_resp_cmp u_dut (
    .clk(clk), .rst(rst), .en(en), .vout(vout), .vout_ref(vout_ref),
    .mismatch(mismatch), .fail(fail), .count(count)
  );
  tpg_resp_cmp #(.CNT_W(3)) u_dut_small (
    .clk(clk), .rst(rst), .en(en), .vout(vout), .vout_ref(vout_ref),
    .mismatch(mismatch_s), .fail(fail_s), .count(count_s)
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
    logic m_mis, m_fail;
    int   m_cnt;
    rst = 1'b1; en = 1'b0; vout = 1'b0; vout_ref = 1'b0;
    @(posedge clk); @(negedge clk);
    rst = 1'b0;
    m_mis = 1'b0; m_fail = 1'b0; m_cnt = 0;
    for (int i = 0; i < 1500; i++) begin
      // First a long stretch with no differences, then random ones.
      en       = ($urandom_range(0, 3) != 0);
      vout_ref = 1'($urandom);
      vout     = (i < 100 || $urandom_range(0, 7) != 0) ? vout_ref : ~vout_ref;
      if (i == 750) rst = 1'b1;
      else          rst = 1'b0;
      if (rst) begin
        m_mis = 1'b0; m_fail = 1'b0; m_cnt = 0;
      end else begin
        m_mis = en && (vout != vout_ref);
        if (m_mis) begin m_fail = 1'b1; m_cnt++; end
      end
      @(posedge clk); #1;
      checks += 5;
      if (mismatch !== m_mis)            begin failures++; $display("%0d: mismatch=%b expected %b", i, mismatch, m_mis); end
      if (fail !== m_fail)               begin failures++; $display("%0d: fail=%b expected %b", i, fail, m_fail); end
      if (int'(count) != m_cnt)          begin failures++; $display("%0d: count=%0d expected %0d", i, count, m_cnt); end
      if (fail_s !== m_fail)             begin failures++; $display("%0d: small fail=%b", i, fail_s); end
      if (int'(count_s) != (m_cnt > 7 ? 7 : m_cnt)) begin failures++; $display("%0d: small count=%0d", i, count_s); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
