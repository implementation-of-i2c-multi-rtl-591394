// i2c_master_rx: master receiver for one byte.
//
// On `go` it releases SDA and clocks eight bits in from the slave, most
// significant bit first, sampling SDA at the end of the first SCL-high
// quarter phase of each bit. On the ninth clock pulse it answers: with
// `ack_in` high it pulls SDA low (ACK, ask for another byte); with `ack_in`
// low it leaves SDA released (not-acknowledge), which tells the slave the
// read is over. The slave changes SDA while SCL is low. The byte format and
// the closing not-acknowledge follow the source description; the quarter-
// phase timing is this design's choice.
//
// Interface: go/ack_in start a byte (ignored while busy); busy is high and
// `line` is valid while it runs; done pulses for one clock after the ninth
// SCL pulse, with `byte_out` valid from then until the next byte.
// Timing: 36 ticks (9 bits x 4 phases) from the first tick after go.
module i2c_master_rx
  import i2c_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       tick,
  input  logic       go,
  input  logic       ack_in,
  input  logic       sda_i,
  output logic       busy,
  output logic       done,
  output logic [7:0] byte_out,
  output i2c_line_t  line
);

  logic [3:0] bitno;   // 0..7 data bits, 8 = acknowledge bit
  logic [1:0] phase;
  logic       ack_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      byte_out <= '0;
      bitno    <= '0;
      phase    <= '0;
      ack_q    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (go) begin
          busy  <= 1'b1;
          ack_q <= ack_in;
          bitno <= '0;
          phase <= '0;
        end
      end else if (tick) begin
        if (phase == 2'd2 && bitno != 4'd8)
          byte_out <= {byte_out[6:0], sda_i};
        if (phase == 2'd3) begin
          if (bitno == 4'd8) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
          bitno <= bitno + 4'd1;
        end
        phase <= phase + 2'd1;
      end
    end
  end

  always_comb begin
    line.scl = phase[1];
    line.sda = (bitno == 4'd8) ? !ack_q : 1'b1;
  end

endmodule
