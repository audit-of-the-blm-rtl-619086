// tb_test_supervisor: with 1 "second" = 50 clocks, normal request after 4 s and
// high request after 8 s. Checks the request times, that a dump before the
// high request does not force the lines, that the first dump after it does,
// that only a passed system test releases them and restarts the timer, and
// the blocking by written consistency / BPBIS results.
module tb_test_supervisor;
  localparam int S = 50;
  logic clk = 0, rst_n = 0;
  logic dump = 0, sd = 0, sp = 0, cw = 0, cp = 0, bw = 0, bp = 0;
  logic rn, rh, ff, ok;
  logic [31:0] sec;
  int checks = 0, failures = 0;
  longint cyc = 0, t_rn = -1, t_rh = -1;

  always #12.5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && rn && t_rn < 0) t_rn = cyc;
    if (rst_n && rh && t_rh < 0) t_rh = cyc;
  end

  test_supervisor #(.CLKS_PER_S(S), .NORMAL_S(4), .HIGH_S(8)) dut (.clk, .rst_n, .dump,
    .systest_done(sd), .systest_pass(sp), .cons_wr(cw), .cons_pass(cp), .bpbis_wr(bw),
    .bpbis_pass(bp), .req_normal(rn), .req_high(rh), .forced_false(ff), .sys_ok(ok), .seconds(sec));

  task automatic check(input bit ok_, input string what);
    checks++;
    if (!ok_) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0; @(negedge clk);
  endtask

  initial begin
    longint t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = cyc;
    check(ok && !rn && !rh, "start: permit allowed, no request");
    repeat (6 * S) @(negedge clk);
    check(rn && !rh, "normal request after 4 s");
    check(t_rn - t0 inside {[4 * S - 2 : 4 * S + 2]}, $sformatf("normal request at %0d clocks", t_rn - t0));
    pulse(dump);
    check(ok && !ff, "dump before the high request does not force");
    repeat (3 * S) @(negedge clk);
    check(rh, "high request after 8 s");
    check(t_rh - t0 inside {[8 * S - 2 : 8 * S + 2]}, $sformatf("high request at %0d clocks", t_rh - t0));
    check(ok, "high request alone does not force");
    pulse(dump);
    check(ff && !ok, "next dump forces the lines 'False'");
    sp = 0; pulse(sd);
    check(ff && !ok, "failed system test keeps them forced");
    sp = 1; pulse(sd);
    check(!ff && ok && !rn && !rh && sec == 0, "passed system test releases and restarts the timer");
    cp = 0; pulse(cw);
    check(!ok, "failed consistency blocks");
    cp = 1; pulse(cw);
    check(ok, "passed consistency releases");
    bp = 0; pulse(bw);
    check(!ok, "failed BPBIS blocks");
    bp = 1; pulse(bw);
    check(ok, "passed BPBIS releases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
