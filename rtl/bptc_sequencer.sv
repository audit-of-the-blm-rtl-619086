// bptc_sequencer: beam permit test of the processing cards (BPTC).
//
// For every card of the crate and for the unmaskable then the maskable line,
// the combiner sends through the energy link the card number and the U or M
// test activation bit. That card then provokes a dump, which runs down the
// daisy chain to the last combiner before the interlock interface; the last
// combiner tells all combiners by pulling the common line OD3 low. The
// sequencer steps:
//   ACTIVATE -> wait for OD3 low (pass) or WAIT_TIMEOUT clocks (fail)
//   RELEASE  -> clear the activation, wait for OD3 high again (or timeout)
// and records one result bit per card and line: result[c] for U of card c,
// result[NCARDS+c] for M. under_test is high for the whole run, which makes the
// last crate keep its lines to the interlock interface 'False'. done pulses at
// the end with pass = all bits set. The wait time is this design's choice:
// three frame periods, since the activation reaches the card only with the
// next frame on the energy link.
module bptc_sequencer #(
  parameter int unsigned NCARDS       = 16,
  parameter int unsigned WAIT_TIMEOUT = 120_000  // 3 ms at 40 MHz: three frame periods
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  od3_low,   // last crate has received the dump
  output logic                  under_test,
  output logic                  u_test, m_test,
  output logic [3:0]            card,
  output logic                  done,
  output logic                  pass,
  output logic [2*NCARDS-1:0]   result
);
  typedef enum logic [1:0] {IDLE, ACT, REL} state_t;
  localparam int unsigned TW = $clog2(WAIT_TIMEOUT + 1);
  localparam int unsigned IW = $clog2(2 * NCARDS);

  state_t        state;
  logic [IW-1:0] idx;        // 0..NCARDS-1 U, NCARDS..2*NCARDS-1 M
  logic [TW-1:0] tcnt;
  logic          timeout;

  assign timeout = (tcnt == TW'(WAIT_TIMEOUT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; idx <= '0; tcnt <= '0; result <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          idx <= '0; tcnt <= '0; result <= '0; state <= ACT;
        end
        ACT: begin
          if (od3_low || timeout) begin
            result[idx] <= od3_low;
            tcnt  <= '0;
            state <= REL;
          end else tcnt <= tcnt + 1'b1;
        end
        default: begin // REL
          if (!od3_low || timeout) begin
            if (od3_low) result[idx] <= 1'b0;  // line did not come back
            tcnt <= '0;
            if (idx == IW'(2 * NCARDS - 1)) begin
              state <= IDLE;
              done  <= 1'b1;
            end else begin
              idx   <= idx + 1'b1;
              state <= ACT;
            end
          end else tcnt <= tcnt + 1'b1;
        end
      endcase
    end
  end

  assign pass       = &result;   // read it with done
  assign under_test = (state != IDLE);
  assign u_test     = (state == ACT) && (idx < IW'(NCARDS));
  assign m_test     = (state == ACT) && (idx >= IW'(NCARDS));
  assign card       = (state == ACT) ? 4'(idx % IW'(NCARDS)) : 4'd0;
endmodule
