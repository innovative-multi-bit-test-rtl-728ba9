// tb_multibit_tpg: end-to-end testbench of the multi-bit test pattern generator
// at its default size (7-stage chain, 16-bit mismatch counter).
//
// It runs every LFSR length, reached both from reset and by switching s1/s0
// while the generator is running, and checks each pattern against a
// shift-register model kept here, with the polynomials x^4+x+1, x^5+x^2+1,
// x^6+x+1 and x^7+x+1 written out independently. For every length it checks:
// the two-edge reseed after a switch, the unused pattern bits being zero, a
// period of exactly 2^n - 1 with every non-zero pattern once, and that the
// pattern sequences listed for the 4- to 7-input example circuits appear as
// consecutive patterns.
//
// The example circuits under test are not modelled gate by gate. A stand-in
// circuit (XOR of all pattern bits) supplies the calculated output; a faulty
// copy with inputs A and B stuck at 1 or stuck at 0 supplies the actual output.
// The testbench checks that the comparator reports exactly the patterns on
// which the two differ, and nothing while the circuit is fault-free.
//
// Mechanisms counted (each must happen at least once): reset start, length
// switch into each of the four lengths, reseed, full period of each length,
// fault-free comparison, detected mismatch, stuck-at-1 and stuck-at-0 runs.
module tb_multibit_tpg;
  logic        clk = 1'b0;
  logic        rst, s1, s0, cmp_en, cut_vout, cut_vout_ref;
  logic [6:0]  pattern;
  logic [2:0]  pattern_width;
  logic        mismatch, fail;
  logic [15:0] mismatch_count;
  int          checks = 0, failures = 0;

  // Counted mechanisms.
  int n_reset_start = 0, n_reseed = 0, n_mismatch = 0, n_clean = 0;
  int n_sa1 = 0, n_sa0 = 0;
  int n_switch_to [4] = '{0, 0, 0, 0};
  int n_period    [4] = '{0, 0, 0, 0};

  multibit_tpg u_dut (
    .clk           (clk),
    .rst           (rst),
    .s1            (s1),
    .s0            (s0),
    .pattern       (pattern),
    .pattern_width (pattern_width),
    .cmp_en        (cmp_en),
    .cut_vout      (cut_vout),
    .cut_vout_ref  (cut_vout_ref),
    .mismatch      (mismatch),
    .fail          (fail),
    .mismatch_count(mismatch_count)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("%t: %s", $time, msg); end
  endtask

  function automatic int tap_of(input int n);
    case (n)
      4:       return 1;
      5:       return 2;
      6:       return 1;
      default: return 1;
    endcase
  endfunction

  function automatic logic [6:0] lfsr_next(input logic [6:0] st, input int n);
    logic fbit;
    fbit = st[tap_of(n) - 1] ^ st[n - 1];
    return ((st << 1) | 7'(fbit)) & 7'((1 << n) - 1);
  endfunction

  // A row as printed, first character = input A = pattern bit 0.
  function automatic logic [6:0] row(input string s);
    logic [6:0] v = '0;
    for (int i = 0; i < s.len(); i++) v[i] = (s[i] == "1");
    return v;
  endfunction

  // Stand-in circuit under test and its faulty copy.
  // fault: 0 none, 1 inputs A and B stuck at 1, 2 inputs A and B stuck at 0.
  int fault = 0;
  int exp_mismatches = 0;
  logic exp_mis_q = 1'b0;

  function automatic logic cut(input logic [6:0] p);
    return ^p;
  endfunction

  // Drive the circuit-under-test outputs for the pattern of this cycle.
  task automatic drive_cut();
    logic [6:0] pf;
    pf = pattern;
    if (fault == 1) pf[1:0] = 2'b11;
    if (fault == 2) pf[1:0] = 2'b00;
    cut_vout_ref = cut(pattern);
    cut_vout     = cut(pf);
  endtask

  // One clock: apply the circuit response, clock, check the comparator.
  task automatic step();
    logic diff;
    drive_cut();
    diff = cmp_en && (cut_vout != cut_vout_ref);
    if (diff) exp_mismatches++;
    @(posedge clk); #1;
    check(mismatch == diff, $sformatf("mismatch=%b expected %b", mismatch, diff));
    check(int'(mismatch_count) == exp_mismatches,
          $sformatf("mismatch_count=%0d expected %0d", mismatch_count, exp_mismatches));
    check(fail == (exp_mismatches != 0), "fail flag wrong");
    if (diff) n_mismatch++;
    else if (cmp_en) n_clean++;
    if (fault == 1) n_sa1++;
    if (fault == 2) n_sa0++;
    @(negedge clk);
  endtask

  logic [6:0] seq [$];
  logic [6:0] st;
  int         cur_n;

  // Run the current length for a full period and a few extra patterns,
  // starting at the seed, and record the sequence.
  task automatic run_period(input int n);
    bit seen [128];
    int period;
    foreach (seen[i]) seen[i] = 1'b0;
    seq.delete();
    st = 7'b0000001;
    period = 0;
    for (int i = 0; i < (1 << n) + 3; i++) begin
      check(pattern == st, $sformatf("n=%0d step %0d: pattern=%b expected %b", n, i, pattern, st));
      check(int'(pattern_width) == n, $sformatf("width=%0d expected %0d", pattern_width, n));
      check((pattern >> n) == 0, "unused pattern bits not zero");
      if (i < (1 << n) - 1) begin
        check(!seen[pattern] && pattern != 0, $sformatf("n=%0d: pattern %b repeated or zero early", n, pattern));
        seen[pattern] = 1'b1;
      end
      if (i > 0 && period == 0 && pattern == 7'b0000001) period = i;
      seq.push_back(pattern);
      step();
      st = lfsr_next(st, n);
    end
    check(period == (1 << n) - 1, $sformatf("n=%0d: period %0d", n, period));
    if (period == (1 << n) - 1) n_period[n - 4]++;
  endtask

  // Check that the printed rows appear in the recorded sequence one after another.
  task automatic expect_rows(input int n, input string rows [$]);
    bit found = 1'b0;
    int len = seq.size();
    for (int s = 0; s < len && !found; s++) begin
      bit ok = 1'b1;
      for (int r = 0; r < rows.size(); r++)
        if (seq[(s + r) % len] != row(rows[r])) ok = 1'b0;
      found = ok;
    end
    check(found, $sformatf("n=%0d: listed pattern rows not found in sequence", n));
  endtask

  // Switch to length n while running; check the reseed timing.
  task automatic switch_to(input int n);
    logic [6:0] nxt;
    {s1, s0} = 2'(n - 4);
    // Edge 1: the request is registered, the old LFSR takes one more step.
    nxt = lfsr_next(pattern, cur_n);
    step();
    check(pattern == nxt, $sformatf("switch: pattern=%b expected old-length step %b", pattern, nxt));
    check(int'(pattern_width) == cur_n, "switch: width changed too early");
    // Edge 2: reseed, the new LFSR starts from the seed.
    step();
    check(pattern == 7'b0000001 && int'(pattern_width) == n,
          $sformatf("switch: pattern=%b width=%0d after reseed", pattern, pattern_width));
    if (pattern == 7'b0000001) n_reseed++;
    n_switch_to[n - 4]++;
    cur_n = n;
  endtask

  initial begin
    rst = 1'b1; {s1, s0} = 2'b00; cmp_en = 1'b0; cut_vout = 1'b0; cut_vout_ref = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(pattern == 7'b0000001 && pattern_width == 3'd4, "reset state");
    rst = 1'b0;
    n_reset_start++;
    cur_n = 4;
    cmp_en = 1'b1;

    // 4 bits from reset, fault-free.
    fault = 0;
    run_period(4);
    expect_rows(4, '{"1100", "1110", "1111", "0111", "1011"});
    expect_rows(4, '{"1010", "1101", "0110"});
    check(mismatch_count == 0 && !fail, "fault-free circuit flagged");

    // 5 bits, inputs stuck at 1.
    switch_to(5);
    fault = 1;
    run_period(5);
    expect_rows(5, '{"10110", "01011", "00101"});

    // 6 bits, fault-free again (counts keep what was found).
    switch_to(6);
    fault = 0;
    run_period(6);
    expect_rows(6, '{"110000", "111000", "111100", "111110", "111111"});

    // 7 bits, inputs stuck at 0.
    switch_to(7);
    fault = 2;
    run_period(7);
    expect_rows(7, '{"1111111", "0111111", "1011111", "0101111"});
    expect_rows(7, '{"0011110", "0001111", "1000111"});

    // Switch back down while running, comparator disabled.
    cmp_en = 1'b0;
    switch_to(4);
    run_period(4);
    cmp_en = 1'b1;
    fault = 0;
    switch_to(6);
    for (int i = 0; i < 10; i++) step();

    // Reset clears the comparator and restarts at the selected length.
    rst = 1'b1;
    @(posedge clk); #1;
    exp_mismatches = 0;
    @(negedge clk);
    rst = 1'b0;
    check(pattern == 7'b0000001 && pattern_width == 3'd6 && !fail && mismatch_count == 0,
          "reset at 6 bits");
    n_reset_start++;
    cur_n = 6;
    run_period(6);

    // Every mechanism must have happened.
    check(n_reset_start >= 2, "reset start never happened");
    check(n_reseed >= 5, "reseed too rare");
    for (int i = 0; i < 4; i++) begin
      check(n_switch_to[i] > 0 || i == 0 && n_reset_start > 0, $sformatf("no switch to %0d bits", i + 4));
      check(n_period[i] > 0, $sformatf("no full period at %0d bits", i + 4));
    end
    check(n_switch_to[0] > 0, "no switch down to 4 bits");
    check(n_mismatch > 0, "no mismatch detected");
    check(n_clean > 0, "no fault-free comparison");
    check(n_sa1 > 0 && n_sa0 > 0, "stuck-at runs missing");
    $display("mechanisms: resets=%0d reseeds=%0d switches=%0d/%0d/%0d/%0d periods=%0d/%0d/%0d/%0d mismatches=%0d clean=%0d",
             n_reset_start, n_reseed, n_switch_to[0], n_switch_to[1], n_switch_to[2], n_switch_to[3],
             n_period[0], n_period[1], n_period[2], n_period[3], n_mismatch, n_clean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
