// i2c_tick_gen: quarter-bit timebase for the I2C master.
//
// A free-running counter that pulses `tick` for one clock every CLK_DIV
// clocks. Every bit-level unit of the master advances its quarter phase on
// this pulse, so one SCL period is 4*CLK_DIV clocks. With the default
// CLK_DIV of 125 and a 50 MHz system clock SCL runs at 100 kHz, the I2C
// standard-mode rate that the DS1307 supports; the divider value is a choice
// of this design, not a figure from the source description.
//
// Interface: clk, synchronous active-high reset, tick output.
// Timing: first tick CLK_DIV clocks after reset is released.
module i2c_tick_gen #(
  parameter int unsigned CLK_DIV = 125
) (
  input  logic clk,
  input  logic reset,
  output logic tick
);

  localparam int unsigned CW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (reset) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(CLK_DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
