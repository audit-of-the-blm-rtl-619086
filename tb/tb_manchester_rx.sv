// tb_manchester_rx: drives Manchester frames built by the testbench itself
// (first half = inverse of the bit, second half = bit, idle low) into
// manchester_rx and checks the decoded words, the broken-frame flag, a
// +-10 % bit-rate deviation and the latency after the last mid-bit edge.
module tb_manchester_rx;
  localparam int CPB = 40;
  logic clk = 0, rst_n = 0, line = 0;
  logic [31:0] frame;
  logic fvalid, ferr;
  int checks = 0, failures = 0;
  int nvalid = 0, nerr = 0;
  logic [31:0] last;
  longint t_mid, t_valid, cyc = 0;

  always #12.5 clk = ~clk;

  manchester_rx #(.CLKS_PER_BIT(CPB), .NBITS(32)) dut (
    .clk, .rst_n, .line_in(line), .frame, .frame_valid(fvalid), .frame_err(ferr));

  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (fvalid) begin nvalid++; last = frame; t_valid = cyc; end
    if (ferr) nerr++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send nbits of w (MSB first) with cpb clocks per bit
  task automatic send(input logic [31:0] w, input int nbits, input int cpb);
    for (int i = 31; i > 31 - nbits; i--) begin
      line = ~w[i];
      repeat (cpb / 2) @(posedge clk);
      line = w[i];
      t_mid = cyc;
      repeat (cpb - cpb / 2) @(posedge clk);
    end
    line = 0;
    repeat (4 * CPB) @(posedge clk);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (200) @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      logic [31:0] w;
      int cpb;
      w = $urandom; w[31] = 1'b1;
      cpb = (k % 3 == 0) ? 36 : (k % 3 == 1) ? 44 : CPB;  // +-10 % bit rate
      nvalid = 0;
      send(w, 32, cpb);
      check(nvalid == 1, $sformatf("frame %0d: one valid pulse, got %0d", k, nvalid));
      check(last == w, $sformatf("frame %0d: %h expected %h", k, last, w));
      if (cpb == CPB)
        check((t_valid - t_mid) inside {[2:5]},
              $sformatf("latency %0d clocks", t_valid - t_mid));
    end
    // a frame cut after 12 bits is broken, the next good one is received
    nerr = 0; nvalid = 0;
    send(32'hDEAD_BEEF, 12, CPB);
    check(nerr == 1 && nvalid == 0, "cut frame flagged as broken");
    send(32'h9123_4567, 32, CPB);
    check(nvalid == 1 && last == 32'h9123_4567, "frame after a broken one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
