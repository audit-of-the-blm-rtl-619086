// system_test_seq: runs the parts of the system test that the combiner decides
// itself, one after the other, and writes the result to the system test
// supervisor.
//
// On start: BPTC first (bptc_start pulse, wait for bptc_done and take
// bptc_pass), then the HVLF modulation (modulation held high while the HV is
// modulated and the HVLF evaluation runs). The first evaluated modulation
// period lets the HV settle and is not used (SETTLE_PERIODS); the next one is
// judged: the test passes when at least hvlf_expected channels (the installed
// chambers) show the modulation. done pulses once with pass = BPTC and HVLF
// passed. The consistency and BPBIS results are decided outside and written
// to the supervisor directly; they are not part of this sequence.
// The order of the two tests, the settling period and the count criterion are
// this design's choices.
module system_test_seq #(
  parameter int unsigned NCH            = 256,
  parameter int unsigned SETTLE_PERIODS = 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      bptc_done,
  input  logic                      bptc_pass,
  input  logic                      hvlf_done,
  input  logic [$clog2(NCH+1)-1:0]  hvlf_npass,
  input  logic [$clog2(NCH+1)-1:0]  hvlf_expected,
  output logic                      bptc_start,
  output logic                      modulation,
  output logic                      busy,
  output logic                      done,
  output logic                      pass,
  output logic                      bptc_ok,
  output logic                      hvlf_ok
);
  typedef enum logic [1:0] {IDLE, BPTC, HVLF} state_t;
  state_t state;
  localparam int unsigned SW = $clog2(SETTLE_PERIODS + 2);
  logic [SW-1:0] periods;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; periods <= '0; bptc_start <= 1'b0; done <= 1'b0; pass <= 1'b0;
      bptc_ok <= 1'b0; hvlf_ok <= 1'b0;
    end else begin
      bptc_start <= 1'b0;
      done       <= 1'b0;
      case (state)
        IDLE: if (start) begin
          bptc_start <= 1'b1; bptc_ok <= 1'b0; hvlf_ok <= 1'b0; state <= BPTC;
        end
        BPTC: if (bptc_done) begin
          bptc_ok <= bptc_pass; periods <= '0; state <= HVLF;
        end
        default: if (hvlf_done) begin  // HVLF
          if (periods == SW'(SETTLE_PERIODS)) begin
            hvlf_ok <= (hvlf_npass >= hvlf_expected);
            pass    <= bptc_ok && (hvlf_npass >= hvlf_expected);
            done    <= 1'b1;
            state   <= IDLE;
          end else periods <= periods + 1'b1;
        end
      endcase
    end
  end

  assign modulation = (state == HVLF);
  assign busy       = (state != IDLE);
endmodule
