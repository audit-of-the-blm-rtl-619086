// bletc_chain_model: testbench model of the 16 processing cards of a crate as
// seen by the combiner. It decodes the combiner's Manchester link (first edge
// from idle = middle of the first '1' bit; each bit is sampled a quarter bit
// after its middle), checks header "10010000" and the CRC-4 (x^4+x+1), and
// keeps the last composite word. The daisy-chained beam permits of the crate
// (tc_u, tc_m) are '1' unless the word asks a card for a test dump on that
// line (card deaf_card on the M line ignores it when deaf is set), or
// drop_u / drop_m force a real dump.
module bletc_chain_model #(
  parameter int CPB = 40
) (
  input  logic        clk,
  input  logic        link,
  input  logic        drop_u, drop_m,
  input  logic        deaf,
  input  logic [3:0]  deaf_card,
  output logic [15:0] word,
  output int          frames,
  output int          bad_frames,
  output logic        tc_u, tc_m
);
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
    word = 16'h0000; frames = 0; bad_frames = 0;
    forever begin
      logic [31:0] f;
      @(posedge link);                // middle of the first bit (a '1')
      f[31] = 1'b1;
      repeat (CPB / 4) @(posedge clk);
      for (int i = 30; i >= 0; i--) begin
        repeat (CPB) @(posedge clk);
        f[i] = link;
      end
      repeat (CPB) @(posedge clk);   // let the line go idle
      if (f[31:24] == 8'h90 && f[3:0] == crc4(f[31:4])) begin
        word = f[23:8];
        frames++;
      end else bad_frames++;
    end
  end

  assign tc_u = !drop_u && !word[5];
  assign tc_m = !drop_m && !(word[4] && !(deaf && word[3:0] == deaf_card));
endmodule
