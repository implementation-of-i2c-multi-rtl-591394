// tb_i2c_master_tx: self-checking testbench for the byte transmitter.
//
// Sends random bytes. A receiver model written here samples SDA on every
// rising SCL edge and, during the ninth clock pulse, answers with a random
// ACK or not-acknowledge on `sda_i`. Checks: the eight sampled bits equal
// the byte, most significant bit first; SDA is released during the ninth
// pulse; `nack` reports the answer; SDA never changes while SCL is high; the
// byte takes exactly 36 ticks (nine bits of four quarter phases); there are
// exactly nine SCL pulses.
module tb_i2c_master_tx;
  import i2c_pkg::*;

  localparam int TICK_DIV = 5;

  logic       clk = 1'b0;
  logic       reset = 1'b1;
  logic       tick;
  logic       go = 1'b0;
  logic [7:0] byte_in = '0;
  logic       sda_i;
  logic       busy, done, nack;
  i2c_line_t  line;

  int checks = 0, failures = 0;
  int tick_cnt = 0;
  logic answer_nack = 1'b0;

  i2c_master_tx dut (.clk, .reset, .tick, .go, .byte_in, .sda_i,
                     .busy, .done, .nack, .line);

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

  // Receiver model: count SCL pulses, pull SDA low for the ninth one on ACK.
  int   pulses;
  logic [8:0] sampled;
  logic prev_scl;
  assign sda_i = line.sda & !(busy && pulses == 8 && !answer_nack);

  task automatic send(input logic [7:0] b, input logic ans);
    int k;
    logic [1:0] prev;
    @(posedge clk iff tick);
    @(negedge clk);
    go = 1'b1; byte_in = b; answer_nack = ans;
    pulses = 0; sampled = '0;
    @(negedge clk);
    go = 1'b0;
    k = 0;
    prev = {line.scl, line.sda};
    while (!done) begin
      if (!prev[1] && line.scl) begin
        sampled = {sampled[7:0], sda_i};
      end
      if (prev[1] && !line.scl) pulses++;
      if (prev[1] && line.scl)
        check(prev[0] == line.sda, "SDA moved while SCL high");
      prev = {line.scl, line.sda};
      @(posedge clk);
      if (tick) k++;
      @(negedge clk);
    end
    check(sampled[8:1] == b, $sformatf("byte sent %h received %h", b, sampled[8:1]));
    check(sampled[0] == ans, "ninth bit carries the receiver's answer");
    check(nack == ans, $sformatf("nack %b expected %b", nack, ans));
    check(k == 36, $sformatf("byte took %0d ticks", k));
    check(pulses == 8, $sformatf("%0d full SCL pulses before the ninth", pulses));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    send(8'hD0, 1'b0);
    send(8'h01, 1'b1);
    send(8'h80, 1'b0);
    for (int i = 0; i < 50; i++) send(8'($urandom), 1'($urandom));
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
