// tb_manchester_tx: sends random frames through manchester_tx and decodes the
// line in the testbench by sampling at 1/4 and 3/4 of each bit: the first
// sample must be the inverse of the bit, the second the bit. Also checks the
// idle level, the busy time of 32 bit periods and that start is ignored while
// busy.
module tb_manchester_tx;
  localparam int CPB = 40;
  logic clk = 0, rst_n = 0, start = 0, line, busy;
  logic [31:0] frame;
  int checks = 0, failures = 0;

  always #12.5 clk = ~clk;

  manchester_tx #(.CLKS_PER_BIT(CPB), .NBITS(32)) dut (
    .clk, .rst_n, .start, .frame, .line_out(line), .busy);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(line == 0 && !busy, "idle low");
    for (int k = 0; k < 20; k++) begin
      logic [31:0] w, got;
      int nbusy;
      bit bad;
      w = $urandom;
      @(negedge clk); frame = w; start = 1;
      @(negedge clk); start = 0; frame = ~w;   // frame must be latched at start
      bad = 0;
      // first bit begins at the clock edge that loaded the frame
      for (int i = 31; i >= 0; i--) begin
        logic h1, h2;
        repeat (CPB / 4 - 1) @(negedge clk);
        h1 = line;
        if (i == 20) begin start = 1; frame = 32'h0; end   // ignored while busy
        repeat (CPB / 2) @(negedge clk);
        h2 = line;
        start = 0;
        repeat (CPB / 4 + 1) @(negedge clk);
        got[i] = h2;
        if (h1 == h2) bad = 1;
      end
      check(!bad, "every bit has a mid-bit transition");
      check(got == w, $sformatf("frame %h sent as %h", w, got));
      nbusy = 0;
      while (busy && nbusy < 100) begin @(negedge clk); nbusy++; end
      check(nbusy <= 2, $sformatf("busy ends with the frame (%0d extra)", nbusy));
      check(line == 0, "line back to idle low");
      repeat (10) @(negedge clk);
    end
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
