// i2c_start_stop: START, repeated START and STOP generator.
//
// On `go` it plays one bus condition, chosen by `cond`, on its line outputs
// and pulses `done` when finished. It walks a six-entry sequence of quarter
// phases, one phase per `tick` of the quarter-bit timebase:
//
//   phase        0  1  2  3  4  5
//   START/RSTART SCL 0  0  1  1  1  1     SDA 1  1  1  1  0  0
//   STOP         SCL 0  0  1  1  1  1     SDA 0  0  0  0  1  1
//
// A START marks a high-to-low SDA edge while SCL is high, a STOP a low-to-high
// SDA edge while SCL is high, as the protocol requires. A START from an idle
// bus (both lines already high) begins at phase 2; a repeated START first
// lowers SCL to release SDA after the preceding acknowledge bit. START ends
// with SCL high and SDA low; STOP leaves the bus idle. Each level is held for
// two quarter phases, half an SCL period, to cover the set-up and hold times
// around the conditions. The conditions follow the source description; the
// phase table is this design's own.
//
// Interface: go/cond start a condition (ignored while busy); busy is high
// and `line` is valid while it runs; done pulses for one clock afterwards.
// Timing: 4 ticks for START, 6 ticks for RSTART and STOP, counted from the
// first tick after go.
module i2c_start_stop
  import i2c_pkg::*;
(
  input  logic      clk,
  input  logic      reset,
  input  logic      tick,
  input  logic      go,
  input  i2c_cond_e cond,
  output logic      busy,
  output logic      done,
  output i2c_line_t line
);

  localparam logic [2:0] LAST_PHASE = 3'd5;

  logic [2:0] phase;
  logic       is_stop;

  always_ff @(posedge clk) begin
    if (reset) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      phase   <= '0;
      is_stop <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (go) begin
          busy    <= 1'b1;
          is_stop <= (cond == COND_STOP);
          phase   <= (cond == COND_START) ? 3'd2 : 3'd0;
        end
      end else if (tick) begin
        if (phase == LAST_PHASE) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          phase <= phase + 3'd1;
        end
      end
    end
  end

  // SCL is high from phase 2 on; SDA changes level between phases 3 and 4.
  always_comb begin
    line.scl = (phase >= 3'd2);
    line.sda = is_stop ? (phase >= 3'd4) : (phase < 3'd4);
  end

endmodule
