// manchester_rx: Manchester decoder for one 1 Mbit/s energy link.
//
// The line idles low between frames. Each bit has a transition in its middle:
// low-to-high is a '1', high-to-low a '0' (IEEE 802.3 convention, chosen here;
// only "Manchester encoding, 1 MHz bit rate" is specified). The first edge after
// a quiet line is the middle of the first bit, which works because every frame
// starts with a '1' header bit. An edge that comes at least 3/4 of a bit after
// the last mid-bit edge is the next mid-bit edge; earlier edges are bit
// boundaries and are skipped. If no mid-bit edge arrives within 5/4 of a bit the
// frame is broken and frame_err pulses. After NBITS bits, frame_valid pulses
// for one clock with the bits in frame (first received bit in the MSB). The
// decoder then waits for two quiet bit times before it accepts a new frame.
// Latency: frame_valid comes 3 clocks (2 synchroniser stages + 1) after the
// last mid-bit edge.
module manchester_rx #(
  parameter int unsigned CLKS_PER_BIT = 40,  // 40 MHz clock / 1 Mbit/s
  parameter int unsigned NBITS        = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             line_in,      // asynchronous serial line
  output logic [NBITS-1:0] frame,
  output logic             frame_valid,  // one-clock pulse
  output logic             frame_err     // one-clock pulse: broken frame
);
  localparam int unsigned MID_MIN = (3 * CLKS_PER_BIT) / 4;
  localparam int unsigned MID_MAX = (5 * CLKS_PER_BIT) / 4;
  localparam int unsigned QUIET   = 2 * CLKS_PER_BIT;
  localparam int unsigned CW      = $clog2(QUIET + 2);
  localparam int unsigned BW      = $clog2(NBITS + 1);

  typedef enum logic [1:0] {S_IDLE, S_RX, S_QUIET} state_t;
  state_t state;

  logic [2:0]    sync;
  logic          edge_seen;
  logic [CW-1:0] cnt;
  logic [BW-1:0] nbits;
  logic [NBITS-1:0] shreg;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sync <= '0;
    else        sync <= {sync[1:0], line_in};

  assign edge_seen = sync[2] ^ sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_QUIET; cnt <= '0; nbits <= '0; shreg <= '0;
      frame <= '0; frame_valid <= 1'b0; frame_err <= 1'b0;
    end else begin
      frame_valid <= 1'b0;
      frame_err   <= 1'b0;
      case (state)
        S_IDLE: if (edge_seen) begin
          shreg <= {shreg[NBITS-2:0], sync[1]};
          nbits <= BW'(1);
          cnt   <= '0;
          state <= S_RX;
        end
        S_RX: begin
          if (edge_seen && cnt >= CW'(MID_MIN - 1)) begin
            shreg <= {shreg[NBITS-2:0], sync[1]};
            cnt   <= '0;
            if (nbits == BW'(NBITS - 1)) begin
              frame       <= {shreg[NBITS-2:0], sync[1]};
              frame_valid <= 1'b1;
              state       <= S_QUIET;
            end else begin
              nbits <= nbits + 1'b1;
            end
          end else if (cnt >= CW'(MID_MAX)) begin
            frame_err <= 1'b1;
            cnt       <= '0;
            state     <= S_QUIET;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: begin  // S_QUIET
          if (edge_seen)               cnt <= '0;
          else if (cnt >= CW'(QUIET))  state <= S_IDLE;
          else                         cnt <= cnt + 1'b1;
        end
      endcase
    end
  end
endmodule
