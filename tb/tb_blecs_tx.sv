// tb_blecs_tx: decodes the output links in the testbench (samples at 1/4 and
// 3/4 of each bit after the first edge) and checks the frame: header
// "10010000", composite word, toggle + "000", CRC-4 (x^4+x+1, MSB first,
// computed here), that A and B carry the same frame and the frame period.
module tb_blecs_tx;
  import blecs_pkg::*;
  localparam int CPB = 40, PER = 2000;
  logic clk = 0, rst_n = 0, tx_a, tx_b, sent, toggle = 0;
  composite_t word;
  int checks = 0, failures = 0;
  longint cyc = 0, t_prev = -1;

  always #12.5 clk = ~clk;
  always @(posedge clk) cyc++;

  blecs_tx #(.CLKS_PER_BIT(CPB), .FRAME_PERIOD(PER)) dut (
    .clk, .rst_n, .word, .toggle, .tx_a, .tx_b, .frame_sent(sent));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [3:0] crc4(input logic [27:0] d);
    logic [4:0] r;
    r = 0;
    for (int i = 27; i >= 0; i--) begin
      r = {r[3:0], 1'b0};
      if (r[4] ^ d[i]) r[3:0] ^= 4'h3;
      r[4] = 0;
    end
    return r[3:0];
  endfunction

  initial begin
    word = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      logic [31:0] got;
      logic [15:0] w;
      bit same;
      @(negedge clk);
      w = 16'($urandom); word = composite_t'(w); toggle = k[0];
      // wait for the start of the next frame: line rises (first half of bit '1' is low,
      // so wait for the sent pulse)
      @(posedge sent);
      same = 1;
      // bits start one clock before 'sent' is seen
      repeat (CPB / 4 - 2) @(negedge clk);
      for (int i = 31; i >= 0; i--) begin
        logic h1;
        h1 = tx_a;
        repeat (CPB / 2) @(negedge clk);
        got[i] = tx_a;
        if (tx_a != tx_b) same = 0;
        if (h1 == tx_a) begin failures++; $display("FAIL: no mid-bit edge in bit %0d", i); end
        repeat (CPB / 2) @(negedge clk);
      end
      check(got[31:24] == 8'b1001_0000, $sformatf("header %b", got[31:24]));
      check(got[23:8] == w, $sformatf("word %h expected %h", got[23:8], w));
      check(got[7:4] == {toggle, 3'b000}, "toggle field");
      check(got[3:0] == crc4(got[31:4]), "CRC-4");
      check(same, "links A and B identical");
      if (t_prev >= 0) check(cyc - t_prev == PER || cyc - t_prev == 2 * PER, "frame period");
      t_prev = cyc - CPB / 4 * 0;
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
