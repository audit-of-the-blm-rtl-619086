// tb_energy_selector: walks through the rows of the A/B source table (normal,
// A in error, B in error, both in error), the toggle-bit timeout with its
// 0xFFFF substitution and the counters, with a short toggle timeout.
module tb_energy_selector;
  import blecs_pkg::*;
  localparam int TTO = 500;
  logic clk = 0, rst_n = 0;
  logic good_a = 0, crc_a = 0, lost_a = 0, lerr_a = 1, tog_a = 0;
  logic good_b = 0, crc_b = 0, lost_b = 0, lerr_b = 1, tog_b = 0;
  logic [15:0] en_a = 0, en_b = 0, energy;
  logic clear = 0, err, toggle, src_b, both_broken;
  energy_counters_t cnt;
  logic [31:0] ms;
  int checks = 0, failures = 0;

  always #12.5 clk = ~clk;

  energy_selector #(.TOGGLE_TIMEOUT(TTO), .CLKS_PER_MS(10)) dut (
    .clk, .rst_n, .good_a, .crc_err_a(crc_a), .lost_a, .link_err_a(lerr_a), .energy_a(en_a),
    .toggle_a(tog_a), .good_b, .crc_err_b(crc_b), .lost_b, .link_err_b(lerr_b),
    .energy_b(en_b), .toggle_b(tog_b), .clear, .energy, .err, .toggle, .src_b,
    .both_broken, .counters(cnt), .ms_since_clear(ms));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one frame period: a = 0 good, 1 crc error; same for b
  task automatic frame(input bit a_bad, input bit b_bad, input logic [15:0] ea,
                       input logic [15:0] eb, input logic tog);
    @(negedge clk);
    en_a = ea; en_b = eb; tog_a = tog; tog_b = tog;
    good_a = !a_bad; crc_a = a_bad; lerr_a = a_bad;
    good_b = !b_bad; crc_b = b_bad; lerr_b = b_bad;
    @(negedge clk);
    good_a = 0; crc_a = 0; good_b = 0; crc_b = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    frame(0, 0, 16'h1000, 16'h2000, 1);
    check(energy == 16'h1000 && !src_b && !err, "row 000: A used");
    frame(1, 0, 16'h1111, 16'h2222, 0);
    check(energy == 16'h2222 && src_b, "row 100: B used");
    frame(0, 1, 16'h3333, 16'h4444, 1);
    check(energy == 16'h3333 && !src_b, "row 010: A used");
    // the links are not aligned: a good B frame between two A frames is not
    // used while A is fine
    @(negedge clk); en_b = 16'h7777; good_b = 1; lerr_b = 0; @(negedge clk); good_b = 0;
    @(negedge clk);
    check(energy == 16'h3333 && !src_b, "B frame ignored while A is good");
    frame(1, 1, 16'h5555, 16'h6666, 0);
    check(energy == 16'h3333 && both_broken, "row 110: previous value kept");
    check(cnt.crc_err_a == 2 && cnt.crc_err_b == 2, "CRC error counters");
    check(cnt.frames_a == 2 && cnt.frames_b == 3, "good frame counters");
    // toggle stays: timeout
    for (int k = 0; k < 3; k++) frame(0, 0, 16'h0800, 16'h0800, 1);
    check(!err, "no timeout yet");
    repeat (TTO) @(negedge clk);
    check(err && energy == 16'hFFFF, "toggle timeout gives 0xFFFF and error");
    check(cnt.toggle_timeout == 1, "toggle timeout counted once");
    repeat (TTO) @(negedge clk);
    check(cnt.toggle_timeout == 1, "still counted once");
    frame(0, 0, 16'h0900, 16'h0900, 0);
    check(!err && energy == 16'h0900, "toggle change clears the timeout");
    // lost frames and clear
    @(negedge clk); lost_a = 1; lost_b = 1; @(negedge clk); lost_a = 0; lost_b = 0;
    @(negedge clk);
    check(cnt.lost_a == 1 && cnt.lost_b == 1, "lost counters");
    check(ms > 0, "time since clear runs");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(cnt == '0 && ms == 0, "clear");
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
