// tb_i2c_master_ctrl: self-checking testbench for the transaction sequencer.
//
// The three bit-level units are replaced by simple responders that log every
// step the sequencer starts and report `done` after a random delay. For random
// writes and reads, some with a not-acknowledge injected at a random byte,
// the log is compared with the expected step list built here:
//   write: START, D0h, reg, data, STOP
//   read:  START, D0h, reg, RSTART, D1h, receive (with NACK), STOP
// and a not-acknowledged byte must be followed directly by STOP with ack_err
// set. Also checked: busy/done handshake, data_out after a read, and that
// a unit is never started while another one is still running.
module tb_i2c_master_ctrl;
  import i2c_pkg::*;

  localparam int LOG_S  = 256;
  localparam int LOG_SR = 257;
  localparam int LOG_P  = 258;
  localparam int LOG_R  = 259;

  logic       clk = 1'b0;
  logic       reset = 1'b1;
  logic       req = 1'b0;
  logic       rw = 1'b0;
  logic [7:0] data_in = '0, addr_in = '0;
  logic [7:0] data_out;
  logic       busy, done, ack_err;
  i2c_state_e state;
  logic       ss_go, tx_go, rx_go, rx_ack;
  i2c_cond_e  ss_cond;
  logic [7:0] tx_byte;
  logic       ss_done = 1'b0, tx_done = 1'b0, tx_nack = 1'b0, rx_done = 1'b0;
  logic [7:0] rx_byte = '0;

  int checks = 0, failures = 0;
  int log_q[$];
  int nack_at;          // index of the transmitted byte to refuse, -1 none
  int tx_count;
  logic [7:0] rd_value;
  int unit_running = 0;

  i2c_master_ctrl dut (
    .clk, .reset, .req, .rw, .data_in, .addr_in, .data_out, .busy, .done,
    .ack_err, .state, .ss_go, .ss_cond, .ss_done, .tx_go, .tx_byte, .tx_done,
    .tx_nack, .rx_go, .rx_ack, .rx_done, .rx_byte);

  always #5 clk = !clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic unit_delay();
    repeat ($urandom_range(1, 6)) @(posedge clk);
  endtask

  // Responders for the three units.
  always @(posedge clk) if (!reset) begin
    if (ss_go) begin
      check(unit_running == 0, "START/STOP started while a unit runs");
      unit_running++;
      log_q.push_back(ss_cond == COND_START ? LOG_S : ss_cond == COND_RSTART ? LOG_SR : LOG_P);
      fork begin
        unit_delay();
        ss_done <= 1'b1; unit_running--;
        @(posedge clk) ss_done <= 1'b0;
      end join_none
    end
    if (tx_go) begin
      check(unit_running == 0, "transmitter started while a unit runs");
      unit_running++;
      log_q.push_back(int'(tx_byte));
      fork begin
        unit_delay();
        tx_nack <= (tx_count == nack_at);
        tx_count++;
        tx_done <= 1'b1; unit_running--;
        @(posedge clk) tx_done <= 1'b0;
      end join_none
    end
    if (rx_go) begin
      check(unit_running == 0, "receiver started while a unit runs");
      check(rx_ack == 1'b0, "single-byte read ends with not-acknowledge");
      unit_running++;
      log_q.push_back(LOG_R);
      fork begin
        unit_delay();
        rx_byte <= rd_value;
        rx_done <= 1'b1; unit_running--;
        @(posedge clk) rx_done <= 1'b0;
      end join_none
    end
  end

  task automatic transaction(input logic r, input logic [7:0] a, input logic [7:0] d,
                             input int refuse);
    int exp_q[$];
    int n_tx;
    int cycles;
    exp_q = r ? '{LOG_S, 32'hD0, int'(a), LOG_SR, 32'hD1, LOG_R, LOG_P}
              : '{LOG_S, 32'hD0, int'(a), int'(d), LOG_P};
    // Cut the list after a refused byte and close it with STOP.
    if (refuse >= 0) begin
      n_tx = 0;
      foreach (exp_q[i]) if (exp_q[i] < 256) begin
        if (n_tx == refuse) begin
          exp_q = exp_q[0:i];
          exp_q.push_back(LOG_P);
          break;
        end
        n_tx++;
      end
    end
    log_q.delete();
    nack_at = refuse; tx_count = 0;
    rd_value = 8'($urandom);
    @(negedge clk);
    req = 1'b1; rw = r; addr_in = a; data_in = d;
    @(negedge clk);
    req = 1'b0; rw = 1'($urandom); addr_in = 8'($urandom); data_in = 8'($urandom);
    check(busy, "busy after request");
    cycles = 0;
    while (!done && cycles < 1000) begin
      @(negedge clk);
      cycles++;
      if (!done) check(busy, "busy until done");
    end
    check(done, "transaction finished");
    check(log_q == exp_q, $sformatf("step list %p expected %p", log_q, exp_q));
    check(ack_err == (refuse >= 0 && refuse < 3),
          $sformatf("ack_err %b refuse %0d", ack_err, refuse));
    if (r && refuse < 0)
      check(data_out == rd_value, $sformatf("data_out %h expected %h", data_out, rd_value));
    @(negedge clk);
    check(!done && !busy && state == ST_IDLE, "back to idle after done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    transaction(1'b0, 8'h08, 8'h55, -1);
    transaction(1'b1, 8'h08, 8'h00, -1);
    for (int i = 0; i < 3; i++) begin
      transaction(1'b0, 8'($urandom), 8'($urandom), i);
      transaction(1'b1, 8'($urandom), 8'($urandom), i);
    end
    for (int i = 0; i < 60; i++)
      transaction(1'($urandom), 8'($urandom), 8'($urandom),
                  ($urandom_range(0, 3) == 0) ? $urandom_range(0, 2) : -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
