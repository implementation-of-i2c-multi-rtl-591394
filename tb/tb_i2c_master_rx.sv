// tb_i2c_master_rx: self-checking testbench for the byte receiver.
//
// A transmitter model written here puts random bytes on `sda_i`, most
// significant bit first, changing SDA only while SCL is low (at go and after
// each falling SCL edge). Checks: `byte_out` equals the byte sent; the
// receiver keeps SDA released for the eight data bits; during the ninth clock
// pulse it pulls SDA low when asked to acknowledge and leaves it high for a
// not-acknowledge; the byte takes exactly 36 ticks.
module tb_i2c_master_rx;
  import i2c_pkg::*;

  localparam int TICK_DIV = 6;

  logic       clk = 1'b0;
  logic       reset = 1'b1;
  logic       tick;
  logic       go = 1'b0;
  logic       ack_in = 1'b0;
  logic       sda_i;
  logic       busy, done;
  logic [7:0] byte_out;
  i2c_line_t  line;

  int checks = 0, failures = 0;
  int tick_cnt = 0;

  i2c_master_rx dut (.clk, .reset, .tick, .go, .ack_in, .sda_i,
                     .busy, .done, .byte_out, .line);

  always #5 clk = !clk;

  always_ff @(posedge clk) begin
    if (reset) tick_cnt <= 0;
    else tick_cnt <= (tick_cnt == TICK_DIV - 1) ? 0 : tick_cnt + 1;
  end
  assign tick = !reset && (tick_cnt == TICK_DIV - 1);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic slave_bit = 1'b1;
  assign sda_i = line.sda & slave_bit;

  task automatic receive(input logic [7:0] b, input logic ack);
    int k, falls;
    logic [1:0] prev;
    logic master_low_in_data, ninth_level;
    @(posedge clk iff tick);
    @(negedge clk);
    go = 1'b1; ack_in = ack;
    slave_bit = b[7];
    @(negedge clk);
    go = 1'b0;
    k = 0; falls = 0;
    master_low_in_data = 1'b0;
    ninth_level = 1'b1;
    prev = {line.scl, line.sda};
    while (!done) begin
      if (prev[1] && !line.scl) begin
        falls++;
        slave_bit = (falls < 8) ? b[7 - falls] : 1'b1;
      end
      if (falls < 8 && !line.sda) master_low_in_data = 1'b1;
      if (falls == 8 && line.scl) ninth_level = line.sda;
      prev = {line.scl, line.sda};
      @(posedge clk);
      if (tick) k++;
      @(negedge clk);
    end
    slave_bit = 1'b1;
    check(byte_out == b, $sformatf("received %h expected %h", byte_out, b));
    check(!master_low_in_data, "SDA released during data bits");
    check(ninth_level == !ack, $sformatf("ninth bit %b for ack_in %b", ninth_level, ack));
    check(k == 36, $sformatf("byte took %0d ticks", k));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    receive(8'hA5, 1'b0);
    receive(8'h5A, 1'b1);
    receive(8'hFF, 1'b0);
    receive(8'h00, 1'b1);
    for (int i = 0; i < 50; i++) receive(8'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
