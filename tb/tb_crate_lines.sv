// tb_crate_lines: four combiners share OD1..OD3 as wired-AND lines; combiner 3
// is the last (its identification input is pulled up, the others see the
// combiner below). Checks the last-crate identification, the decoding of the
// line table (normal, under test, modulation, last crate got the dump) on
// every combiner and the hold of the last crate's lines.
module tb_crate_lines;
  logic clk = 0, rst_n = 0;
  logic [3:0] lt = 0, lm = 0, pl = 0;
  logic [3:0] p1, p2, p3, idout, last, sut, mod, got, hold;
  logic od1, od2, od3;
  int checks = 0, failures = 0;

  always #12.5 clk = ~clk;

  assign od1 = !(|p1);
  assign od2 = !(|p2);
  assign od3 = !(|p3);

  for (genvar i = 0; i < 4; i++) begin : g
    // crate i sees the identification output of crate i+1; the last one sees the pull-up
    logic id_in;
    assign id_in = (i == 3) ? 1'b1 : idout[i + 1];
    crate_lines u (.clk, .rst_n, .od1_in(od1), .od2_in(od2), .od3_in(od3), .last_id_in(id_in),
      .local_test(lt[i]), .local_modulation(lm[i]), .permit_in_low(pl[i]),
      .od1_pull(p1[i]), .od2_pull(p2[i]), .od3_pull(p3[i]), .id_out(idout[i]),
      .is_last(last[i]), .sys_under_test(sut[i]), .modulation(mod[i]),
      .last_got_dump(got[i]), .hold_low(hold[i]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic settle; repeat (4) @(negedge clk); endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    settle();
    check(last == 4'b1000, $sformatf("last crate identified: %b", last));
    check({od1, od2, od3} == 3'b111 && sut == 0 && mod == 0 && got == 0, "normal 111");
    lt[1] = 1; settle();
    check({od1, od2} == 2'b01 && sut == 4'hF && mod == 0, "system under test seen by all");
    check(hold == 4'b1000, "last crate holds its lines");
    pl[1] = 1; settle();
    check(got == 0, "a non-last crate does not signal the dump");
    pl[3] = 1; settle();
    check(!od3 && got == 4'hF, "last crate got the dump, all see OD3 low");
    pl = 0; lt = 0; lm[2] = 1; settle();
    check({od1, od2, od3} == 3'b001 && mod == 4'hF && sut == 4'hF, "modulation 00x");
    lm = 0; settle();
    check({od1, od2, od3} == 3'b111 && hold == 0, "back to normal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
