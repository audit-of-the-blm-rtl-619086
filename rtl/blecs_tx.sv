// blecs_tx: sends the composite word to the 16 processing cards.
//
// Every FRAME_PERIOD clocks (1 ms, the CISV frame rate, chosen here) a 32-bit
// frame is built and sent by a manchester_tx on both output links A and B,
// which go to all 16 cards in parallel. The frame is, first bit first:
// header "10010000", the 16-bit composite word, the toggle bit followed by
// "000", and a CRC-4 over the 28 bits before it. The word and toggle are taken
// when the frame starts. The bit rate is taken to be the same 1 Mbit/s as the
// incoming link. frame_sent pulses when a frame has been started.
module blecs_tx
  import blecs_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 40,
  parameter int unsigned FRAME_PERIOD = 40_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  composite_t word,
  input  logic       toggle,
  output logic       tx_a,
  output logic       tx_b,
  output logic       frame_sent
);
  localparam int unsigned PW = $clog2(FRAME_PERIOD + 1);

  logic [PW-1:0] pcnt;
  logic          start, busy, line;
  logic [27:0]   body;
  logic [31:0]   frame;

  assign body  = {BLECS_HEADER, word, toggle, 3'b000};
  assign frame = {body, crc4_28(body)};
  assign start = (pcnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcnt <= PW'(1); frame_sent <= 1'b0;
    end else begin
      frame_sent <= start && !busy;
      pcnt <= (pcnt == PW'(FRAME_PERIOD - 1)) ? '0 : pcnt + 1'b1;
    end
  end

  manchester_tx #(.CLKS_PER_BIT(CLKS_PER_BIT), .NBITS(32)) u_tx (
    .clk, .rst_n, .start, .frame, .line_out(line), .busy);

  assign tx_a = line;
  assign tx_b = line;
endmodule
