// energy_frame_rx: receiver and checker for one CISV beam energy link (A or B).
//
// A manchester_rx decodes the 32-bit frame: header "1001", spare "000", toggle
// bit, 16-bit energy and an 8-bit CRC over the first 24 bits. Each decoded frame
// ends in exactly one of three one-clock pulses:
//   good     - header, spare and CRC correct; energy and toggle are updated,
//   crc_err  - header and spare correct but the CRC does not match,
//   lost     - the Manchester decoding broke or the header/spare is wrong.
// A frame arrives every millisecond. If none is received for FRAME_TIMEOUT clocks
// (default 1.5 ms, this design's choice) lost pulses as well and the timeout
// restarts. link_err is high from a CRC error or a timeout until the next good
// frame: it is the "CRC error or timeout" column of the source selection table.
// good comes 4 clocks after the last mid-bit edge of the frame.
module energy_frame_rx
  import blecs_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT  = 40,
  parameter int unsigned FRAME_TIMEOUT = 60_000  // 1.5 ms at 40 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        line_in,
  output logic        good,
  output logic        crc_err,
  output logic        lost,
  output logic        link_err,
  output logic [15:0] energy,
  output logic        toggle
);
  localparam int unsigned TW = $clog2(FRAME_TIMEOUT + 1);

  logic [31:0] frame;
  logic        fvalid, ferr;
  logic        hdr_ok, crc_ok;
  logic [TW-1:0] tcnt;

  manchester_rx #(.CLKS_PER_BIT(CLKS_PER_BIT), .NBITS(32)) u_dec (
    .clk, .rst_n, .line_in, .frame, .frame_valid(fvalid), .frame_err(ferr));

  assign hdr_ok = (frame[31:28] == CISV_HEADER) && (frame[27:25] == 3'b000);
  assign crc_ok = (crc8_24(frame[31:8]) == frame[7:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      good <= 1'b0; crc_err <= 1'b0; lost <= 1'b0; link_err <= 1'b1;
      energy <= '0; toggle <= 1'b0; tcnt <= '0;
    end else begin
      good <= 1'b0; crc_err <= 1'b0; lost <= 1'b0;
      if (fvalid && hdr_ok && crc_ok) begin
        good     <= 1'b1;
        energy   <= frame[23:8];
        toggle   <= frame[24];
        link_err <= 1'b0;
        tcnt     <= '0;
      end else begin
        if (fvalid && hdr_ok) begin
          crc_err  <= 1'b1;
          link_err <= 1'b1;
        end else if (fvalid || ferr) begin
          lost <= 1'b1;
        end
        if (tcnt == TW'(FRAME_TIMEOUT - 1)) begin
          tcnt     <= '0;
          lost     <= 1'b1;
          link_err <= 1'b1;
        end else begin
          tcnt <= tcnt + 1'b1;
        end
      end
    end
  end
endmodule
