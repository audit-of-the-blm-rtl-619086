// test_supervisor: periodic system test request and the test result that gates
// the beam permit.
//
// A timer of whole seconds runs since the last successful system test. After
// NORMAL_S seconds it raises a normal-priority request, after HIGH_S seconds a
// high-priority one (24 h and 48 h here; the periods are this design's choice).
// Once the high-priority request is up, the next dump (a fall of the combined
// beam permit) makes the supervisor force the beam permit lines 'False'; they
// stay so until a system test passes. The results of the consistency check and
// of the BPBIS test are decided outside and written here (pass/fail); a failed
// one also blocks the permit until it is written as passed. sys_ok is the
// "system test result" input of the permit AND gates.
module test_supervisor #(
  parameter int unsigned CLKS_PER_S = 40_000_000,
  parameter int unsigned NORMAL_S   = 86_400,
  parameter int unsigned HIGH_S     = 172_800
) (
  input  logic clk,
  input  logic rst_n,
  input  logic dump,               // one-clock pulse: beam permit fell
  input  logic systest_done,       // one-clock pulse
  input  logic systest_pass,
  input  logic cons_wr,  cons_pass,    // consistency result written
  input  logic bpbis_wr, bpbis_pass,   // BPBIS result written
  output logic req_normal,
  output logic req_high,
  output logic forced_false,
  output logic sys_ok,
  output logic [31:0] seconds
);
  localparam int unsigned CW = $clog2(CLKS_PER_S + 1);
  logic [CW-1:0] ccnt;
  logic cons_ok, bpbis_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ccnt <= '0; seconds <= '0; forced_false <= 1'b0; cons_ok <= 1'b1; bpbis_ok <= 1'b1;
    end else begin
      if (systest_done && systest_pass) begin
        ccnt <= '0; seconds <= '0; forced_false <= 1'b0;
      end else begin
        if (ccnt == CW'(CLKS_PER_S - 1)) begin
          ccnt <= '0;
          if (seconds != '1) seconds <= seconds + 1'b1;
        end else ccnt <= ccnt + 1'b1;
        if (dump && req_high) forced_false <= 1'b1;
      end
      if (cons_wr)  cons_ok  <= cons_pass;
      if (bpbis_wr) bpbis_ok <= bpbis_pass;
    end
  end

  assign req_normal = (seconds >= NORMAL_S);
  assign req_high   = (seconds >= HIGH_S);
  assign sys_ok     = !forced_false && cons_ok && bpbis_ok;
endmodule
