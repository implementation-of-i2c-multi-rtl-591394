// i2c_master_top: single-master I2C bus controller for a DS1307 RTC.
//
// The controller writes one byte into, or reads one byte from, a register of
// an I2C slave, by default the DS1307 real-time clock at address 1101000. The
// user presents a register address (addr_in), a data byte (data_in) and the
// direction (rw: 0 write, 1 read) and raises `req`; the controller then runs
// the whole bus transaction on its own and pulses `done`.
//
// Inside, a quarter-bit timebase (i2c_tick_gen) paces three bit-level units:
// the START/STOP generator, the byte transmitter and the byte receiver. The
// sequencer (i2c_master_ctrl) starts them one at a time. Whichever unit is
// running owns the bus; its SCL/SDA levels are registered here, and the
// register holds the last level between two units, so the lines never glitch
// between steps. SDA is open drain: sda_o = 0 pulls the line low and 1
// releases it to the external pull-up. SCL is driven push-pull, which is
// enough with a single master and a slave that does not stretch the clock. The
// SDA input passes a two-flop synchronizer before it is sampled.
//
// The ports follow the controller's I/O diagram (clk, reset, R/w, data_in,
// addr_in, SCL, SDA). The req/busy/done/ack_err handshake, data_out, the
// split SDA pins and the synchronizer are this design's additions.
//
// Timing: one SCL period is 4*CLK_DIV clocks, 100 kHz from a 50 MHz clock by
// default. A write takes 4 + 3*36 + 6 = 118 quarter-bit ticks of bus activity,
// a read 4 + 2*36 + 6 + 2*36 + 6 = 160 ticks, plus two clocks per step.
module i2c_master_top
  import i2c_pkg::*;
#(
  parameter int unsigned CLK_DIV    = 125,
  parameter logic [6:0]  SLAVE_ADDR = DS1307_ADDR
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       req,
  input  logic       rw,
  input  logic [7:0] data_in,
  input  logic [7:0] addr_in,
  output logic [7:0] data_out,
  output logic       busy,
  output logic       done,
  output logic       ack_err,
  output logic       scl_o,
  output logic       sda_o,
  input  logic       sda_i
);

  logic       tick;
  logic       sda_meta, sda_sync;

  i2c_state_e state;
  logic       ss_go, ss_busy, ss_done;
  i2c_cond_e  ss_cond;
  logic       tx_go, tx_busy, tx_done, tx_nack;
  logic [7:0] tx_byte;
  logic       rx_go, rx_busy, rx_done, rx_ack;
  logic [7:0] rx_byte;
  i2c_line_t  ss_line, tx_line, rx_line, bus_q;

  i2c_tick_gen #(.CLK_DIV(CLK_DIV)) u_tick (
    .clk, .reset, .tick
  );

  i2c_master_ctrl #(.SLAVE_ADDR(SLAVE_ADDR)) u_ctrl (
    .clk, .reset,
    .req, .rw, .data_in, .addr_in, .data_out, .busy, .done, .ack_err,
    .state,
    .ss_go, .ss_cond, .ss_done,
    .tx_go, .tx_byte, .tx_done, .tx_nack,
    .rx_go, .rx_ack, .rx_done, .rx_byte
  );

  i2c_start_stop u_ss (
    .clk, .reset, .tick,
    .go(ss_go), .cond(ss_cond), .busy(ss_busy), .done(ss_done), .line(ss_line)
  );

  i2c_master_tx u_tx (
    .clk, .reset, .tick,
    .go(tx_go), .byte_in(tx_byte), .sda_i(sda_sync),
    .busy(tx_busy), .done(tx_done), .nack(tx_nack), .line(tx_line)
  );

  i2c_master_rx u_rx (
    .clk, .reset, .tick,
    .go(rx_go), .ack_in(rx_ack), .sda_i(sda_sync),
    .busy(rx_busy), .done(rx_done), .byte_out(rx_byte), .line(rx_line)
  );

  // SDA input synchronizer; the idle bus level is high.
  always_ff @(posedge clk) begin
    if (reset) begin
      sda_meta <= 1'b1;
      sda_sync <= 1'b1;
    end else begin
      sda_meta <= sda_i;
      sda_sync <= sda_meta;
    end
  end

  // Bus owner: the running unit drives, otherwise the last level is held.
  always_ff @(posedge clk) begin
    if (reset)
      bus_q <= LINE_IDLE;
    else if (ss_busy)
      bus_q <= ss_line;
    else if (tx_busy)
      bus_q <= tx_line;
    else if (rx_busy)
      bus_q <= rx_line;
  end

  assign scl_o = bus_q.scl;
  assign sda_o = bus_q.sda;

  // At most one bit-level unit may own the bus at a time.
  a_one_owner: assert property (@(posedge clk) disable iff (reset)
    !((ss_busy && tx_busy) || (ss_busy && rx_busy) || (tx_busy && rx_busy)));

  // Outside a START/STOP condition SDA may only change while SCL is low.
  a_sda_stable: assert property (@(posedge clk) disable iff (reset)
    (scl_o && $past(scl_o) && !$past(ss_busy, 2) && !$past(ss_busy)) |-> $stable(sda_o));

endmodule
