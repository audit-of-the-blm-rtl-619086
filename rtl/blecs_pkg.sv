// blecs_pkg: types and constants shared by the BLECS combiner FPGA blocks.
//
// The clock is taken as 40 MHz (one LHC bunch clock), so 40 clock cycles make one
// bit of the 1 Mbit/s energy links. The frame layouts (CISV frame in, BLECS frame
// out) and the composite word sent to the 16 processing cards follow the
// combiner's published bit maps; the CRC polynomials are this design's choice
// because no polynomial is specified for either link.
package blecs_pkg;

  // CISV energy frame: header "1001", spare "000", toggle, energy[15:0], CRC8.
  localparam logic [3:0] CISV_HEADER = 4'b1001;
  // BLECS frame header "10010000".
  localparam logic [7:0] BLECS_HEADER = 8'b1001_0000;

  // CRC-8, polynomial x^8+x^2+x+1 (0x07), initial value 0, MSB first.
  localparam logic [7:0] CRC8_POLY = 8'h07;
  // CRC-4, polynomial x^4+x+1 (0x3), initial value 0, MSB first.
  localparam logic [3:0] CRC4_POLY = 4'h3;

  // Composite 16-bit word sent to the processing cards (bit 15 first).
  typedef struct packed {
    logic [4:0] energy;      // [15:11] beam energy level 0..31
    logic       err;         // [10] energy error bit
    logic       soft_reset;  // [9]  soft reset of the processing cards
    logic       under_test;  // [8]  system under test
    logic       u_info;      // [7]  unmaskable beam info (from the interlock interface)
    logic       m_info;      // [6]  maskable beam info
    logic       u_test;      // [5]  unmaskable BPL test activation
    logic       m_test;      // [4]  maskable BPL test activation
    logic [3:0] card;        // [3:0] card number for the BPL test
  } composite_t;

  // Word sent when both links are broken: energy 31, error 1, both beam infos 1.
  localparam composite_t BROKEN_LINK = '{energy: 5'd31, err: 1'b1, soft_reset: 1'b0,
                                         under_test: 1'b0, u_info: 1'b1, m_info: 1'b1,
                                         u_test: 1'b0, m_test: 1'b0, card: 4'd0};

  // Error/event counters of the energy reception.
  typedef struct packed {
    logic [15:0] frames_a;
    logic [15:0] frames_b;
    logic [15:0] crc_err_a;
    logic [15:0] crc_err_b;
    logic [15:0] lost_a;
    logic [15:0] lost_b;
    logic [15:0] toggle_timeout;
  } energy_counters_t;

  // One step of an MSB-first CRC-8 over one bit.
  function automatic logic [7:0] crc8_step(input logic [7:0] crc, input logic b);
    logic fb;
    fb = crc[7] ^ b;
    return {crc[6:0], 1'b0} ^ (fb ? CRC8_POLY : 8'h00);
  endfunction

  function automatic logic [3:0] crc4_step(input logic [3:0] crc, input logic b);
    logic fb;
    fb = crc[3] ^ b;
    return {crc[2:0], 1'b0} ^ (fb ? CRC4_POLY : 4'h0);
  endfunction

  // CRC-8 of the first 24 bits of a CISV frame (header to energy).
  function automatic logic [7:0] crc8_24(input logic [23:0] d);
    logic [7:0] c;
    c = 8'h00;
    for (int i = 23; i >= 0; i--) c = crc8_step(c, d[i]);
    return c;
  endfunction

  // CRC-4 of the first 28 bits of a BLECS frame (header to toggle field).
  function automatic logic [3:0] crc4_28(input logic [27:0] d);
    logic [3:0] c;
    c = 4'h0;
    for (int i = 27; i >= 0; i--) c = crc4_step(c, d[i]);
    return c;
  endfunction

endpackage
