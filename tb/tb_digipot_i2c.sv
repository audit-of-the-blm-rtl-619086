// tb_digipot_i2c: an I2C target model in the testbench detects START and STOP,
// shifts bytes on rising SCL and acknowledges its address 0x2C. Checks the
// address byte, the written value, the STOP, and nack for a target that does
// not answer.
module tb_digipot_i2c;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] value;
  logic sda_pull, scl_pull, busy, done, nack;
  wire  scl = !scl_pull;
  logic sda_slave_pull = 0, present = 1;
  wire  sda = !(sda_pull || sda_slave_pull);
  int checks = 0, failures = 0;
  logic [7:0] bytes [4];
  int nb = 0, bitn = 0, nstart = 0, nstop = 0;
  logic [7:0] sh;

  always #12.5 clk = ~clk;

  digipot_i2c #(.QUARTER(10), .ADDR(7'h2C)) dut (.clk, .rst_n, .start, .value, .sda_in(sda),
    .sda_pull, .scl_pull, .busy, .done, .nack);

  // target model
  always @(negedge sda) if (scl && rst_n) begin nstart++; bitn = 0; nb = 0; end
  always @(posedge sda) if (scl && rst_n) nstop++;
  always @(posedge scl) begin
    if (bitn < 8) sh = {sh[6:0], sda};
    bitn++;
  end
  always @(negedge scl) begin
    if (bitn == 8) begin
      if (nb < 4) bytes[nb] = sh;
      nb++;
      sda_slave_pull = present;       // acknowledge
    end else if (bitn == 9) begin
      sda_slave_pull = 0;
      bitn = 0;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      logic [7:0] v;
      v = 8'($urandom);
      present = (k != 2);
      value = v;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      check(busy, "busy");
      @(posedge done);
      repeat (5) @(negedge clk);
      check(nb == 2, $sformatf("two bytes, got %0d", nb));
      check(bytes[0] == {7'h2C, 1'b0}, $sformatf("address byte %h", bytes[0]));
      check(bytes[1] == v, $sformatf("value %h expected %h", bytes[1], v));
      check(nstart == k + 1 && nstop == k + 1, $sformatf("START and STOP %0d %0d", nstart, nstop));
      check(nack == (k == 2), "acknowledge");
      check(scl && sda && !busy, "bus released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
