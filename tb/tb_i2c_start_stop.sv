// tb_i2c_start_stop: self-checking testbench for the START/STOP generator.
//
// Drives every condition (START, repeated START, STOP) many times with a
// quarter-bit tick every TICK_DIV clocks. At each tick it compares the SCL and
// SDA levels with a reference table written out here, checks that the
// condition takes 4 ticks (START) or 6 ticks (RSTART, STOP) until `done`, and
// checks the defining bus edge: SDA falls while SCL is high for a START, SDA
// rises while SCL is high for a STOP, and SDA never moves while SCL is high
// otherwise.
module tb_i2c_start_stop;
  import i2c_pkg::*;

  localparam int TICK_DIV = 4;

  logic      clk = 1'b0;
  logic      reset = 1'b1;
  logic      tick;
  logic      go = 1'b0;
  i2c_cond_e cond = COND_START;
  logic      busy, done;
  i2c_line_t line;

  int checks = 0, failures = 0;
  int tick_cnt = 0;

  i2c_start_stop dut (.clk, .reset, .tick, .go, .cond, .busy, .done, .line);

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

  // Expected {scl, sda} for each tick interval of a condition.
  function automatic logic [1:0] expect_line(i2c_cond_e c, int k);
    logic [1:0] start_tab [6] = '{2'b01, 2'b01, 2'b11, 2'b11, 2'b10, 2'b10};
    logic [1:0] stop_tab  [6] = '{2'b00, 2'b00, 2'b10, 2'b10, 2'b11, 2'b11};
    case (c)
      COND_START:  return start_tab[k + 2];
      COND_RSTART: return start_tab[k];
      default:     return stop_tab[k];
    endcase
  endfunction

  task automatic run_cond(input i2c_cond_e c);
    int n_ticks, k;
    logic seen_edge;
    logic [1:0] prev;
    n_ticks = (c == COND_START) ? 4 : 6;
    @(posedge clk iff tick);  // align to the timebase
    @(negedge clk);
    go = 1'b1; cond = c;
    @(negedge clk);
    go = 1'b0;
    k = 0;
    seen_edge = 1'b0;
    prev = {line.scl, line.sda};
    while (!done) begin
      check(busy, "busy while running");
      check({line.scl, line.sda} == expect_line(c, k),
            $sformatf("cond %s interval %0d line %b", c.name(), k, {line.scl, line.sda}));
      if (prev[1] && line.scl && prev[0] != line.sda) begin
        if (c == COND_STOP) check(line.sda == 1'b1, "STOP edge must be rising");
        else                check(line.sda == 1'b0, "START edge must be falling");
        seen_edge = 1'b1;
      end
      prev = {line.scl, line.sda};
      @(posedge clk);
      if (tick) k++;
      @(negedge clk);
    end
    check(k == n_ticks, $sformatf("cond %s took %0d ticks", c.name(), k));
    check(seen_edge, $sformatf("cond %s produced its SDA edge with SCL high", c.name()));
    @(negedge clk);
    check(!done && !busy, "done is a single pulse");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 20; i++) begin
      run_cond(COND_START);
      run_cond(COND_RSTART);
      run_cond(COND_STOP);
      run_cond(i2c_cond_e'($urandom_range(0, 2)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
