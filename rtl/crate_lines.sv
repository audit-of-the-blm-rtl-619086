// crate_lines: the common open-drain lines between the combiners of one point
// (OD1, OD2, OD3) and the identification of the last crate.
//
// Every combiner can pull a line low; a line is high only when no one pulls it
// (wired AND). Meaning of the line levels:
//   OD1 OD2 OD3
//    1   1   1   normal operation
//    x   x   0   the last combiner has received the beam permit 'False'
//    0   1   x   system under test: the HV goes to the 100 pA test level
//    0   0   x   system under test with HV modulation level and modulation
// This block pulls OD1 while this crate runs a test, OD1 and OD2 while it runs
// the modulation test, and, on the last crate only, OD3 while the combined
// beam permit input is 'False'. It decodes the line levels for the rest of the
// card. The last crate is the one whose identification input reads '1': its
// input is pulled up and only a combiner below it pulls it to '0'; this card
// always drives '0' on its identification output for the crate above.
// On the last crate, system under test keeps the lines to the interlock
// interface 'False' (hold_low). Inputs pass a two-flop synchroniser.
module crate_lines (
  input  logic clk,
  input  logic rst_n,
  input  logic od1_in, od2_in, od3_in,   // line levels
  input  logic last_id_in,               // '1': no combiner below, this is the last
  input  logic local_test,               // this crate runs a test
  input  logic local_modulation,         // this crate runs the modulation test
  input  logic permit_in_low,            // combined permit input is 'False'
  output logic od1_pull, od2_pull, od3_pull,  // 1 = drive the line low
  output logic id_out,
  output logic is_last,
  output logic sys_under_test,
  output logic modulation,
  output logic last_got_dump,
  output logic hold_low
);
  logic [3:0] s1, s2;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin s1 <= '1; s2 <= '1; end
    else begin s1 <= {od1_in, od2_in, od3_in, last_id_in}; s2 <= s1; end

  assign is_last        = s2[0];
  assign sys_under_test = !s2[3];
  assign modulation     = !s2[3] && !s2[2];
  assign last_got_dump  = !s2[1];
  assign hold_low       = is_last && sys_under_test;

  assign od1_pull = local_test || local_modulation;
  assign od2_pull = local_modulation;
  assign od3_pull = is_last && permit_in_low;
  assign id_out   = 1'b0;
endmodule
