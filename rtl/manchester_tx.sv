// manchester_tx: Manchester transmitter for one serial frame.
//
// A one-clock start pulse loads frame; the bits then leave MSB first, each
// CLKS_PER_BIT clocks long, first half the inverse of the bit and second half
// the bit itself (low-to-high = '1'), the same convention manchester_rx
// decodes. The line idles low and busy is high from start until the last bit
// has been sent. start is ignored while busy. One frame of NBITS bits takes
// NBITS*CLKS_PER_BIT clocks.
module manchester_tx #(
  parameter int unsigned CLKS_PER_BIT = 40,
  parameter int unsigned NBITS        = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NBITS-1:0] frame,
  output logic             line_out,
  output logic             busy
);
  localparam int unsigned HALF = CLKS_PER_BIT / 2;
  localparam int unsigned CW   = $clog2(CLKS_PER_BIT + 1);
  localparam int unsigned BW   = $clog2(NBITS + 1);

  logic [NBITS-1:0] shreg;
  logic [CW-1:0]    cnt;
  logic [BW-1:0]    left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0; cnt <= '0; left <= '0; busy <= 1'b0; line_out <= 1'b0;
    end else if (!busy) begin
      line_out <= 1'b0;
      if (start) begin
        shreg    <= frame;
        left     <= BW'(NBITS);
        cnt      <= '0;
        busy     <= 1'b1;
        line_out <= ~frame[NBITS-1];
      end
    end else begin
      if (cnt == CW'(HALF - 1)) begin
        line_out <= shreg[NBITS-1];
        cnt      <= cnt + 1'b1;
      end else if (cnt == CW'(CLKS_PER_BIT - 1)) begin
        cnt <= '0;
        if (left == BW'(1)) begin
          busy     <= 1'b0;
          line_out <= 1'b0;
        end else begin
          shreg    <= {shreg[NBITS-2:0], 1'b0};
          line_out <= ~shreg[NBITS-2];
        end
        left <= left - 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
