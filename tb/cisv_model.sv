// cisv_model: testbench model of the timing interface card that sends the beam
// energy on two Manchester links A and B. Every PERIOD clocks it sends a
// 32-bit frame ("1001", "000", toggle, energy, CRC-8 x^8+x^2+x+1) on both
// links. corrupt_a / corrupt_b flip one CRC bit on that link, silent_a /
// silent_b keep the link idle. frames counts the frames sent.
module cisv_model #(
  parameter int CPB    = 40,
  parameter int PERIOD = 40_000
) (
  input  logic        clk,
  input  logic [15:0] energy,
  input  logic        toggle,
  input  logic        corrupt_a, corrupt_b, silent_a, silent_b,
  output logic        line_a, line_b,
  output int          frames
);
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

  initial begin
    line_a = 0; line_b = 0; frames = 0;
    forever begin
      logic [31:0] fa, fb;
      logic [23:0] b;
      logic sa, sb;
      repeat (PERIOD - 32 * CPB) @(posedge clk);
      b  = {4'b1001, 3'b000, toggle, energy};
      fa = {b, crc8(b)}; fb = fa;
      if (corrupt_a) fa[0] = ~fa[0];
      if (corrupt_b) fb[1] = ~fb[1];
      sa = silent_a; sb = silent_b;
      for (int i = 31; i >= 0; i--) begin
        line_a = !sa && !fa[i]; line_b = !sb && !fb[i];
        repeat (CPB / 2) @(posedge clk);
        line_a = !sa && fa[i];  line_b = !sb && fb[i];
        repeat (CPB / 2) @(posedge clk);
      end
      line_a = 0; line_b = 0;
      frames++;
    end
  end
endmodule
