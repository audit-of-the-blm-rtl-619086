// digipot_i2c: writes the 8-bit setting of the modulation attenuator, a
// digitally controlled potentiometer on an I2C bus.
//
// A one-clock start sends: START, the 7-bit device address with the write bit,
// the 8-bit value, STOP. Both lines are open drain: *_pull high means "drive
// low", low means "release" (pulled up on the board). The controller reads sda
// during the ninth clock of each byte; a high level there is a missing
// acknowledge and sets nack. Each quarter of a bit lasts QUARTER clocks (100 at
// 40 MHz gives 100 kHz). The address, the two-byte write and the bus speed are
// this design's choice: the potentiometer part is not named.
module digipot_i2c #(
  parameter int unsigned QUARTER = 100,
  parameter logic [6:0]  ADDR    = 7'h2C
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] value,
  input  logic       sda_in,
  output logic       sda_pull,
  output logic       scl_pull,
  output logic       busy,
  output logic       done,     // one-clock pulse at the end of the STOP
  output logic       nack
);
  typedef enum logic [1:0] {IDLE, STA, BITS, STO} state_t;
  localparam int unsigned QW = $clog2(QUARTER + 1);

  state_t        state;
  logic [QW-1:0] qcnt;
  logic [1:0]    q;        // quarter within the bit
  logic [4:0]    nb;       // bit 0..17 (two bytes of 9 bits)
  logic [17:0]   sh;       // bits to send, ack slots as '1' (release)
  logic          qend;

  assign qend = (qcnt == QW'(QUARTER - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; qcnt <= '0; q <= '0; nb <= '0; sh <= '0;
      sda_pull <= 1'b0; scl_pull <= 1'b0; busy <= 1'b0; done <= 1'b0; nack <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state == IDLE) begin
        sda_pull <= 1'b0; scl_pull <= 1'b0;
        if (start) begin
          sh    <= {ADDR, 1'b0, 1'b1, value, 1'b1};
          nack  <= 1'b0; busy <= 1'b1; qcnt <= '0; q <= '0; nb <= '0;
          state <= STA;
        end
      end else begin
        qcnt <= qend ? '0 : qcnt + 1'b1;
        if (qend) q <= q + 1'b1;
        case (state)
          STA: if (qend) begin
            // q0: SDA falls with SCL high; q1: SCL falls
            if (q == 2'd0) sda_pull <= 1'b1;
            if (q == 2'd1) begin scl_pull <= 1'b1; q <= '0; state <= BITS; end
          end
          BITS: if (qend) begin
            case (q)
              2'd0: sda_pull <= !sh[17];               // data while SCL low
              2'd1: scl_pull <= 1'b0;                  // SCL rises
              2'd2: if (nb == 5'd8 || nb == 5'd17) begin
                      if (sda_in) nack <= 1'b1;        // acknowledge slot
                    end
              default: begin
                scl_pull <= 1'b1;                      // SCL falls
                sh <= {sh[16:0], 1'b0};
                if (nb == 5'd17) state <= STO;
                nb <= nb + 1'b1;
              end
            endcase
          end
          default: if (qend) begin  // STO
            case (q)
              2'd0: sda_pull <= 1'b1;
              2'd1: scl_pull <= 1'b0;
              2'd2: sda_pull <= 1'b0;                  // SDA rises with SCL high
              default: begin busy <= 1'b0; done <= 1'b1; state <= IDLE; end
            endcase
          end
        endcase
      end
    end
  end
endmodule
