// i2c_master_ctrl: transaction sequencer of the I2C master.
//
// A finite state machine that turns one request into the byte sequence of a
// DS1307 register access and hands each step to a bit-level unit: the
// START/STOP generator, the byte transmitter or the byte receiver. It waits
// for each unit's `done` before starting the next one.
//
//   write (rw = 0):  START, SLA+W, register, data, STOP
//   read  (rw = 1):  START, SLA+W, register, repeated START, SLA+R,
//                    receive one byte answered with not-acknowledge, STOP
//
// SLA is the 7-bit slave address (1101000 for the DS1307) followed by the
// direction bit. The read first writes the register address to set the
// slave's register pointer, then reads from it, with a repeated START and no
// STOP in between. These sequences follow the source description. Its choices
// are kept where they are clear. This design adds the following: if the slave
// does not acknowledge any transmitted byte, the controller skips the rest of
// the transfer, sends STOP and raises `ack_err`. The `req`/`busy`/`done`
// handshake and the `data_out` output are also this design's own.
//
// Interface: `req` is sampled while idle, together with rw, data_in and
// addr_in, which are held internally for the whole transaction. `busy` is high
// from the clock after `req` until `done` pulses, at which time `data_out`
// (read) and `ack_err` are valid; they stay valid until the next request.
// Timing: each step starts two clocks after the previous unit's last tick.
module i2c_master_ctrl
  import i2c_pkg::*;
#(
  parameter logic [6:0] SLAVE_ADDR = DS1307_ADDR
) (
  input  logic       clk,
  input  logic       reset,
  // user side
  input  logic       req,
  input  logic       rw,
  input  logic [7:0] data_in,
  input  logic [7:0] addr_in,
  output logic [7:0] data_out,
  output logic       busy,
  output logic       done,
  output logic       ack_err,
  output i2c_state_e state,
  // START/STOP generator
  output logic       ss_go,
  output i2c_cond_e  ss_cond,
  input  logic       ss_done,
  // byte transmitter
  output logic       tx_go,
  output logic [7:0] tx_byte,
  input  logic       tx_done,
  input  logic       tx_nack,
  // byte receiver
  output logic       rx_go,
  output logic       rx_ack,
  input  logic       rx_done,
  input  logic [7:0] rx_byte
);

  logic       rw_q;
  logic [7:0] data_q;
  logic [7:0] addr_q;

  // Next-state and unit-start decisions.
  i2c_state_e state_d;
  logic       ss_go_d, tx_go_d, rx_go_d;
  i2c_cond_e  ss_cond_d;
  logic [7:0] tx_byte_d;
  logic       nack_seen;

  always_comb begin
    state_d   = state;
    ss_go_d   = 1'b0;
    tx_go_d   = 1'b0;
    rx_go_d   = 1'b0;
    ss_cond_d = ss_cond;
    tx_byte_d = tx_byte;
    nack_seen = 1'b0;

    unique case (state)
      ST_IDLE: if (req) begin
        state_d   = ST_START;
        ss_go_d   = 1'b1;
        ss_cond_d = COND_START;
      end
      ST_START: if (ss_done) begin
        state_d   = ST_SLA_W;
        tx_go_d   = 1'b1;
        tx_byte_d = {SLAVE_ADDR, RW_WRITE};
      end
      ST_SLA_W, ST_REG, ST_WDATA, ST_SLA_R: if (tx_done) begin
        if (tx_nack || state == ST_WDATA) begin
          nack_seen = tx_nack;
          state_d   = ST_STOP;
          ss_go_d   = 1'b1;
          ss_cond_d = COND_STOP;
        end else if (state == ST_SLA_W) begin
          state_d   = ST_REG;
          tx_go_d   = 1'b1;
          tx_byte_d = addr_q;
        end else if (state == ST_REG && rw_q == RW_READ) begin
          state_d   = ST_RSTART;
          ss_go_d   = 1'b1;
          ss_cond_d = COND_RSTART;
        end else if (state == ST_REG) begin
          state_d   = ST_WDATA;
          tx_go_d   = 1'b1;
          tx_byte_d = data_q;
        end else begin  // ST_SLA_R acknowledged
          state_d   = ST_RDATA;
          rx_go_d   = 1'b1;
        end
      end
      ST_RSTART: if (ss_done) begin
        state_d   = ST_SLA_R;
        tx_go_d   = 1'b1;
        tx_byte_d = {SLAVE_ADDR, RW_READ};
      end
      ST_RDATA: if (rx_done) begin
        state_d   = ST_STOP;
        ss_go_d   = 1'b1;
        ss_cond_d = COND_STOP;
      end
      ST_STOP: if (ss_done) begin
        state_d   = ST_DONE;
      end
      ST_DONE: state_d = ST_IDLE;
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state    <= ST_IDLE;
      ss_go    <= 1'b0;
      tx_go    <= 1'b0;
      rx_go    <= 1'b0;
      ss_cond  <= COND_START;
      tx_byte  <= '0;
      rw_q     <= RW_WRITE;
      data_q   <= '0;
      addr_q   <= '0;
      data_out <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      ack_err  <= 1'b0;
    end else begin
      state   <= state_d;
      ss_go   <= ss_go_d;
      tx_go   <= tx_go_d;
      rx_go   <= rx_go_d;
      ss_cond <= ss_cond_d;
      tx_byte <= tx_byte_d;
      done    <= (state == ST_DONE);
      if (state == ST_IDLE && req) begin
        rw_q    <= rw;
        data_q  <= data_in;
        addr_q  <= addr_in;
        busy    <= 1'b1;
        ack_err <= 1'b0;
      end
      if (state == ST_DONE)
        busy <= 1'b0;
      if (nack_seen)
        ack_err <= 1'b1;
      if (state == ST_RDATA && rx_done)
        data_out <= rx_byte;
    end
  end

  // Only a single byte is read, so the receiver always closes with a
  // not-acknowledge.
  assign rx_ack = 1'b0;

endmodule
