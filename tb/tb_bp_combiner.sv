// tb_bp_combiner: random permit inputs, test-mode forcing and hold; the
// expected line states are computed in the testbench and compared 3 clocks
// after each change (2 synchroniser stages + output register).
module tb_bp_combiner;
  logic clk = 0, rst_n = 0;
  logic tc_u, tc_m, ua, ub, ma, mb, sys_ok, hold, tmode, fu, fm, fb;
  logic u_comb, m_comb, u_recv, m_recv, oua, oub, oma, omb;
  int checks = 0, failures = 0;
  int n_test = 0, n_hold = 0, n_perm = 0;

  always #12.5 clk = ~clk;

  bp_combiner dut (.clk, .rst_n, .tc_u, .tc_m, .up_ua(ua), .up_ub(ub), .up_ma(ma), .up_mb(mb),
    .sys_ok, .hold_low(hold), .test_mode(tmode), .force_u_en(fu), .force_m_en(fm),
    .force_sel_b(fb), .u_comb, .m_comb, .u_recv, .m_recv, .out_ua(oua), .out_ub(oub), .out_ma(oma), .out_mb(omb));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    {tc_u, tc_m, ua, ub, ma, mb, sys_ok, hold, tmode, fu, fm, fb} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      logic eu, em;
      logic [3:0] exp;
      @(negedge clk);
      // mostly all permits high, so that both outcomes occur
      {tc_u, tc_m, ua, ub, ma, mb, sys_ok} = ($urandom_range(0, 2) == 0) ? 7'($urandom) : 7'h7F;
      hold  = ($urandom_range(0, 5) == 0);
      tmode = ($urandom_range(0, 3) == 0);
      {fu, fm, fb} = 3'($urandom);
      eu = tc_u & ua & ub & sys_ok;
      em = tc_m & ma & mb & sys_ok;
      if (hold)       begin exp = 4'b0000; n_hold++; end
      else if (tmode) begin exp = {fu & !fb, fu & fb, fm & !fb, fm & fb}; n_test++; end
      else            begin exp = {eu, eu, em, em}; n_perm += int'(eu | em); end
      repeat (3) @(negedge clk);
      check({oua, oub, oma, omb} == exp, $sformatf("lines %b expected %b", {oua, oub, oma, omb}, exp));
      check(u_comb == eu && m_comb == em, "combined permits");
      check(u_recv == (tc_u & ua & ub) && m_recv == (tc_m & ma & mb), "received permits");
    end
    check(n_test > 0 && n_hold > 0 && n_perm > 0, "all modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
