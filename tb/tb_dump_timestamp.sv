// tb_dump_timestamp: several dumps with known delays. The testbench drops the
// permit, waits a random number of microseconds before the post-mortem freeze
// trigger and before the beam info falls, and checks both counters to 1 us,
// the beam-info-after-dump status, the frozen turn count and bunch count, and
// the rearm.
module tb_dump_timestamp;
  localparam int CPU = 40;
  logic clk = 0, rst_n = 0;
  logic permit = 1, info = 1, frz = 0, turn = 0, rearm = 0;
  logic dumped, fseen, iseen, iad;
  logic [31:0] to_f, to_i, tc, tfz;
  logic [15:0] bc, bfz;
  int checks = 0, failures = 0;
  int turns = 0;

  always #12.5 clk = ~clk;

  dump_timestamp #(.CLKS_PER_US(CPU), .TURN_TIMEOUT(700)) dut (.clk, .rst_n, .permit, .beam_info(info),
    .pm_freeze(frz), .turn_clk(turn), .rearm, .dumped, .freeze_seen(fseen), .to_freeze(to_f),
    .info_seen(iseen), .info_after_dump(iad), .to_info(to_i), .turn_count(tc), .bunch_count(bc),
    .turn_frozen(tfz), .bunch_frozen(bfz), .turn_ok(tok), .turn_missing(tmiss));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // turn clock every 300 clocks (short orbit for the test)
  logic turn_stop = 0;
  logic tok;
  logic [15:0] tmiss;
  initial forever begin
    repeat (295) @(negedge clk);
    wait (!turn_stop);
    turn = 1; turns++;
    repeat (5) @(negedge clk);
    turn = 0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      int df, di, turns_at;
      df = $urandom_range(5, 60);
      di = (k == 5) ? -1 : $urandom_range(2, 80);
      permit = 1; info = 1;
      @(negedge clk); rearm = 1; @(negedge clk); rearm = 0;
      repeat ($urandom_range(400, 900)) @(negedge clk);
      check(!dumped, "no dump while permitted");
      if (k == 5) info = 0;          // beam info already down before the request
      permit = 0;
      turns_at = turns;
      fork
        begin repeat (df * CPU) @(negedge clk); frz = 1; repeat (4) @(negedge clk); frz = 0; end
        begin if (di >= 0) begin repeat (di * CPU) @(negedge clk); info = 0; end end
      join
      repeat (10) @(negedge clk);
      check(dumped && fseen, "dump and freeze seen");
      check(int'(to_f) inside {[df - 1 : df]}, $sformatf("dump to freeze %0d us, expected %0d", to_f, df));
      if (di >= 0) begin
        check(iad && iseen, "beam info fell after the dump request");
        check(int'(to_i) inside {[di - 1 : di]}, $sformatf("dump to info %0d us, expected %0d", to_i, di));
      end else begin
        check(!iad, "beam info was already down");
      end
      check(int'(tfz) == turns_at || int'(tfz) == turns_at - 1, "turn count frozen at the dump");
      check(bfz < 16'd300, "bunch count within the turn");
      check(tc >= tfz, "turn counter keeps running");
    end
    // turn clock check: present, then lost for a while, then back
    check(tok && tmiss == 0, "turn clock present");
    turn_stop = 1;
    repeat (1300) @(negedge clk);
    check(!tok && tmiss == 1, "turn clock loss seen and counted once");
    repeat (1500) @(negedge clk);
    check(tmiss == 1, "a long loss counts once");
    turn_stop = 0;
    repeat (400) @(negedge clk);
    check(tok && tmiss == 1, "turn clock back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
