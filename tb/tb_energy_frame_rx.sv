// tb_energy_frame_rx: CISV frames with correct and corrupted CRC, wrong header
// and silence. The testbench builds frames and their CRC-8 (x^8+x^2+x+1, MSB
// first, initial 0) itself and checks energy, toggle, the good / crc_err / lost
// pulses and the link error flag after the frame timeout.
module tb_energy_frame_rx;
  localparam int CPB = 40;
  localparam int TO  = 3000;
  logic clk = 0, rst_n = 0, line = 0;
  logic good, crc_err, lost, link_err, toggle;
  logic [15:0] energy;
  int checks = 0, failures = 0;
  int ngood = 0, ncrc = 0, nlost = 0;

  always #12.5 clk = ~clk;

  energy_frame_rx #(.CLKS_PER_BIT(CPB), .FRAME_TIMEOUT(TO)) dut (
    .clk, .rst_n, .line_in(line), .good, .crc_err, .lost, .link_err, .energy, .toggle);

  always @(posedge clk) begin
    ngood += int'(good); ncrc += int'(crc_err); nlost += int'(lost);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] crc8(input logic [23:0] d);
    logic [8:0] r;
    r = 0;
    for (int i = 23; i >= 0; i--) begin
      r = {r[7:0], 1'b0};
      if (r[8] ^ d[i]) r[7:0] = r[7:0] ^ 8'h07;
      r[8] = 0;
    end
    return r[7:0];
  endfunction

  task automatic send(input logic [31:0] w);
    for (int i = 31; i >= 0; i--) begin
      line = ~w[i]; repeat (CPB / 2) @(posedge clk);
      line = w[i];  repeat (CPB / 2) @(posedge clk);
    end
    line = 0;
    repeat (4 * CPB) @(posedge clk);
  endtask

  function automatic logic [31:0] mk(input logic tog, input logic [15:0] e);
    logic [23:0] b;
    b = {4'b1001, 3'b000, tog, e};
    return {b, crc8(b)};
  endfunction

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (200) @(posedge clk);
    check(link_err, "link in error before the first frame");
    for (int k = 0; k < 20; k++) begin
      logic [15:0] e;
      e = 16'($urandom);
      ngood = 0; ncrc = 0; nlost = 0;
      send(mk(k[0], e));
      check(ngood == 1 && ncrc == 0 && nlost == 0, $sformatf("good frame %0d", k));
      check(energy == e && toggle == k[0], "energy and toggle");
      check(!link_err, "no link error after a good frame");
    end
    // corrupted CRC
    for (int k = 0; k < 8; k++) begin
      logic [31:0] w;
      w = mk(1'b1, 16'h1234);
      w[$urandom_range(0, 15)] ^= 1'b1;   // flip a bit of energy or CRC
      ngood = 0; ncrc = 0; nlost = 0;
      send(w);
      check(ncrc == 1 && ngood == 0, "CRC error detected");
      check(link_err, "link error after CRC error");
      check(energy != 16'h1234 || k > 0, "bad energy not taken");
    end
    send(mk(0, 16'h0042));
    check(!link_err && energy == 16'h0042, "recovers with a good frame");
    // wrong header
    ngood = 0; ncrc = 0; nlost = 0;
    begin
      logic [23:0] b;
      b = {4'b1011, 3'b000, 1'b0, 16'h7777};
      send({b, crc8(b)});
    end
    check(nlost == 1 && ngood == 0 && ncrc == 0, "wrong header counted as lost");
    // silence: timeout
    nlost = 0;
    repeat (TO + 100) @(posedge clk);
    check(nlost >= 1 && link_err, "frame timeout");
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
