// bpl_test_ctrl: test mode of the beam permit lines towards the interlock
// interface, under the control of an outside (interlock) system.
//
// States:
//   NORMAL     - lines follow the combined permit. A test request moves to
//                WAIT_INFO.
//   WAIT_INFO  - waits until both beam infos (unmaskable and maskable) are
//                'False'. Test mode can only be entered without beam.
//   WAIT_DELAY - the beam infos must stay 'False' for ENTER_DELAY clocks (the
//                predefined time, here 1 s at 40 MHz); if one comes back the
//                FSM returns to WAIT_INFO.
//   TEST       - test_mode is high: all lines 'False' except the one (A or B)
//                the outside system forces 'True'. The force inputs pass only
//                in this state. The FSM leaves when a result is given.
//   BLOCKED    - the test failed: the lines stay 'False' (blocked) until a
//                new test passes.
// A pass returns to NORMAL. Withdrawing the request before TEST returns to the
// state the request came from. result_valid is a one-clock pulse.
module bpl_test_ctrl #(
  parameter int unsigned ENTER_DELAY = 40_000_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic test_req,
  input  logic u_info, m_info,
  input  logic ext_force_u, ext_force_m, ext_sel_b,
  input  logic result_valid, result_pass,
  output logic test_mode,
  output logic blocked,
  output logic force_u_en, force_m_en, force_sel_b,
  output logic [2:0] state_o
);
  typedef enum logic [2:0] {NORMAL, WAIT_INFO, WAIT_DELAY, TEST, BLOCKED} state_t;
  localparam int unsigned DW = $clog2(ENTER_DELAY + 1);

  state_t state;
  logic   failed;            // a test has failed and none has passed since
  logic [DW-1:0] dcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= NORMAL; failed <= 1'b0; dcnt <= '0;
    end else begin
      case (state)
        NORMAL, BLOCKED: if (test_req) state <= WAIT_INFO;
        WAIT_INFO: begin
          dcnt <= '0;
          if (!test_req)              state <= failed ? BLOCKED : NORMAL;
          else if (!u_info && !m_info) state <= WAIT_DELAY;
        end
        WAIT_DELAY: begin
          if (!test_req)             state <= failed ? BLOCKED : NORMAL;
          else if (u_info || m_info) state <= WAIT_INFO;
          else if (dcnt == DW'(ENTER_DELAY - 1)) state <= TEST;
          else dcnt <= dcnt + 1'b1;
        end
        TEST: if (result_valid) begin
          failed <= !result_pass;
          state  <= result_pass ? NORMAL : BLOCKED;
        end
        default: state <= NORMAL;
      endcase
    end
  end

  assign test_mode   = (state == TEST);
  assign blocked     = failed && (state != TEST);
  assign force_u_en  = test_mode && ext_force_u;
  assign force_m_en  = test_mode && ext_force_m;
  assign force_sel_b = test_mode && ext_sel_b;
  assign state_o     = state;
endmodule
