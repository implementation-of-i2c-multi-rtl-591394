// i2c_pkg: types and constants shared by the I2C master blocks.
//
// Timing convention used by every bit-level unit: one SCL period is split
// into four quarter phases of CLK_DIV system clocks each. SCL is low in
// phases 0 and 1 and high in phases 2 and 3; the master changes SDA only at
// the start of phase 0 (SCL low) and samples SDA at the end of phase 2, in
// the middle of the SCL high time. START, repeated START and STOP are the only
// places where SDA moves while SCL is high.
package i2c_pkg;

  // Level driven onto the two bus lines. For SDA, 1 releases the open-drain
  // line (the pull-up makes it high) and 0 pulls it low. SCL is push-pull.
  typedef struct packed {
    logic scl;
    logic sda;
  } i2c_line_t;

  localparam i2c_line_t LINE_IDLE = '{scl: 1'b1, sda: 1'b1};

  // Bus condition requested from the START/STOP generator.
  typedef enum logic [1:0] {
    COND_START  = 2'd0,  // from an idle bus
    COND_RSTART = 2'd1,  // repeated START after an acknowledge bit
    COND_STOP   = 2'd2
  } i2c_cond_e;

  // Direction bit that follows the 7-bit slave address.
  localparam logic RW_WRITE = 1'b0;
  localparam logic RW_READ  = 1'b1;

  // 7-bit address of the DS1307 real-time clock.
  localparam logic [6:0] DS1307_ADDR = 7'b1101000;

  // States of the transaction sequencer, numbered after the ten-step
  // algorithm the controller follows (idle, start, address, register,
  // data, stop, address for read, receive, stop).
  typedef enum logic [3:0] {
    ST_IDLE    = 4'd0,
    ST_START   = 4'd1,
    ST_SLA_W   = 4'd2,
    ST_REG     = 4'd3,
    ST_WDATA   = 4'd4,
    ST_RSTART  = 4'd5,
    ST_SLA_R   = 4'd6,
    ST_RDATA   = 4'd7,
    ST_STOP    = 4'd8,
    ST_DONE    = 4'd9
  } i2c_state_e;

endpackage
