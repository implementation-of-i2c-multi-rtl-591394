// i2c_master_tx: master transmitter for one byte.
//
// On `go` it loads `byte_in` and sends it on SDA, most significant bit first,
// one bit per SCL period, then releases SDA for a ninth clock pulse and
// samples the receiver's acknowledge: a low SDA is an ACK, a high SDA a
// not-acknowledge, reported on `nack`. Each bit takes four quarter phases
// (SCL low, low, high, high); SDA changes only at the start of a bit, while
// SCL is low, and is sampled at the end of the first high phase. This follows
// the byte-plus-acknowledge format of the source description; the
// quarter-phase timing is this design's choice.
//
// Interface: go/byte_in start a byte (ignored while busy); busy is high and
// `line` is valid while it runs; done pulses for one clock after the ninth
// SCL pulse, with `nack` valid from then until the next byte.
// Timing: 36 ticks (9 bits x 4 phases) from the first tick after go.
module i2c_master_tx
  import i2c_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       tick,
  input  logic       go,
  input  logic [7:0] byte_in,
  input  logic       sda_i,
  output logic       busy,
  output logic       done,
  output logic       nack,
  output i2c_line_t  line
);

  logic [7:0] shreg;
  logic [3:0] bitno;   // 0..7 data bits, 8 = acknowledge bit
  logic [1:0] phase;

  always_ff @(posedge clk) begin
    if (reset) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      nack  <= 1'b0;
      shreg <= '0;
      bitno <= '0;
      phase <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (go) begin
          busy  <= 1'b1;
          shreg <= byte_in;
          bitno <= '0;
          phase <= '0;
        end
      end else if (tick) begin
        if (phase == 2'd2 && bitno == 4'd8)
          nack <= sda_i;
        if (phase == 2'd3) begin
          shreg <= {shreg[6:0], 1'b0};
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
    line.sda = (bitno == 4'd8) ? 1'b1 : shreg[7];
  end

endmodule
