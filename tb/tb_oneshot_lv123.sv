// tb_oneshot_lv123: daisy chain of three one-shot models, each triggered by a
// 2 MHz clock, the clear input of each taken from the previous one (the first
// tied high). Checks that the chain stays high while all clocks run, that
// stopping one card's clock drops it and everything after it within about the
// pulse width, and that a low clear drops the output at once.
module tb_oneshot_lv123;
  logic clk2m = 0;
  logic [2:0] run = 3'b111;
  logic [2:0] q, qn;
  logic first_clr = 1;
  int checks = 0, failures = 0;

  always #250ns clk2m = ~clk2m;

  oneshot_lv123 #(.TW_NS(1000)) u0 (.a_n(1'b0), .b(clk2m & run[0]), .clr_n(first_clr), .q(q[0]), .q_n(qn[0]));
  oneshot_lv123 #(.TW_NS(1000)) u1 (.a_n(1'b0), .b(clk2m & run[1]), .clr_n(q[0]), .q(q[1]), .q_n(qn[1]));
  oneshot_lv123 #(.TW_NS(1000)) u2 (.a_n(1'b0), .b(clk2m & run[2]), .clr_n(q[1]), .q(q[2]), .q_n(qn[2]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #3us;
    // q[1] and q[2] may need the previous stage up before the next trigger
    #3us;
    check(q == 3'b111 && qn == 3'b000, "chain high while all clocks run");
    for (int k = 0; k < 10; k++) begin #700ns; check(q == 3'b111, "stays high (retriggered)"); end
    run[1] = 0;                 // card 1 stops its clock
    #600ns;
    check(q[0] == 1, "card 0 unaffected");
    #1us;
    check(q[1] == 0 && q[2] == 0, "card 1 and downstream dropped after the pulse width");
    run[1] = 1;
    #3us;
    check(q == 3'b111, "chain back after the clock restarts");
    first_clr = 0;              // broken wire at the start of the chain
    #1ns;
    check(q == 3'b000, "clear drops the whole chain at once");
    first_clr = 1;
    #3us;
    check(q == 3'b111, "chain back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
