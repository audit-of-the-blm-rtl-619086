// tb_bpl_test_ctrl: the outside-system test of the beam permit lines. Checks
// that test mode is not entered while a beam info is 'True', only after the
// entry delay, that forcing passes only in test mode, that a failed result
// blocks the lines and that a later passed test releases them.
module tb_bpl_test_ctrl;
  localparam int DLY = 100;
  logic clk = 0, rst_n = 0;
  logic req = 0, ui = 1, mi = 1, efu = 0, efm = 0, esb = 0, rv = 0, rp = 0;
  logic tmode, blocked, fu, fm, fb;
  logic [2:0] st;
  int checks = 0, failures = 0;

  always #12.5 clk = ~clk;

  bpl_test_ctrl #(.ENTER_DELAY(DLY)) dut (.clk, .rst_n, .test_req(req), .u_info(ui), .m_info(mi),
    .ext_force_u(efu), .ext_force_m(efm), .ext_sel_b(esb), .result_valid(rv), .result_pass(rp),
    .test_mode(tmode), .blocked, .force_u_en(fu), .force_m_en(fm), .force_sel_b(fb), .state_o(st));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic result(input bit pass);
    @(negedge clk); rv = 1; rp = pass; @(negedge clk); rv = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    efu = 1; efm = 1; esb = 1;
    @(negedge clk);
    check(!fu && !fm && !fb, "no forcing outside test mode");
    req = 1;
    repeat (3 * DLY) @(negedge clk);
    check(!tmode, "no test mode with beam info 'True'");
    ui = 0;
    repeat (3 * DLY) @(negedge clk);
    check(!tmode, "no test mode with M beam info 'True'");
    mi = 0;
    repeat (DLY - 5) @(negedge clk);
    check(!tmode, "entry delay not yet over");
    mi = 1; @(negedge clk); mi = 0;       // beam info back briefly: delay restarts
    repeat (DLY - 5) @(negedge clk);
    check(!tmode, "delay restarted by the beam info");
    repeat (10) @(negedge clk);
    check(tmode, "test mode after the delay");
    check(fu && fm && fb, "forcing passes in test mode");
    result(0);
    check(!tmode && blocked, "failed test blocks the lines");
    req = 0;
    repeat (5) @(negedge clk);
    check(blocked, "still blocked without a new test");
    req = 1;
    repeat (DLY + 10) @(negedge clk);
    check(tmode && !blocked, "new test");
    result(1);
    check(!tmode && !blocked, "passed test returns to normal");
    req = 0;
    repeat (5) @(negedge clk);
    check(st == 3'd0, "normal state");
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
