// tb_i2c_master_top: end-to-end test of the I2C master with a DS1307 model.
//
// The master runs with its default parameters (SCL = clk/500). Two slaves
// share the bus through a modelled pull-up (wired AND of the open-drain SDA
// outputs): a DS1307 model at 1101000 and a second device at 1010000 that the
// master never addresses. The test writes random bytes into RTC registers,
// reads them back, reads registers it never wrote, and makes the RTC refuse
// its address to exercise the not-acknowledge path. A reference copy of the
// RTC's registers kept here predicts every read.
//
// It checks data, ack_err, the write and read durations against the tick
// budget of the transaction, the SCL period (4*CLK_DIV clocks) and its
// minimum high and low times, and that SDA changes while SCL is high only as
// a START, repeated START or STOP. A bus monitor counts those conditions and
// the acknowledges; every mechanism (write, read, START, repeated START,
// STOP, slave ACK, slave NACK with ack_err, closing master NACK) must occur.
module tb_i2c_master_top;

  localparam int DIV = 125;           // the master's default CLK_DIV
  localparam int WRITE_TICKS = 4 + 3 * 36 + 6;
  localparam int READ_TICKS  = 4 + 2 * 36 + 6 + 2 * 36 + 6;

  logic       clk = 1'b0;
  logic       reset = 1'b1;
  logic       req = 1'b0;
  logic       rw = 1'b0;
  logic [7:0] data_in = '0, addr_in = '0;
  logic [7:0] data_out;
  logic       busy, done, ack_err;
  logic       scl, m_sda, rtc_sda, other_sda, sda;
  logic       rtc_nack = 1'b0;

  int checks = 0, failures = 0;
  logic [7:0] ref_mem [64];

  i2c_master_top dut (
    .clk, .reset, .req, .rw, .data_in, .addr_in, .data_out, .busy, .done,
    .ack_err, .scl_o(scl), .sda_o(m_sda), .sda_i(sda));

  ds1307_model rtc (.scl, .sda, .nack_all(rtc_nack), .sda_o(rtc_sda));
  ds1307_model #(.ADDR(7'b1010000)) other (.scl, .sda, .nack_all(1'b0), .sda_o(other_sda));

  assign sda = m_sda & rtc_sda & other_sda;

  always #5 clk = !clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Bus monitor, sampled on the system clock.
  int   n_start = 0, n_rstart = 0, n_stop = 0;
  int   n_slave_ack = 0, n_slave_nack = 0;
  logic bus_busy = 1'b0;
  logic prev_scl = 1'b1, prev_sda = 1'b1;
  int   scl_bits = 0;          // SCL pulses since the last condition
  int   t_rise = -1, t_fall = -1, now = 0;
  int   min_period = 1 << 30, min_high = 1 << 30, min_low = 1 << 30;
  logic master_tx_byte;        // the ninth bit is answered by the slave

  always @(posedge clk) begin
    now++;
    if (reset) begin
      prev_scl = 1'b1;
      prev_sda = 1'b1;
    end else begin
      if (prev_scl && scl && prev_sda != sda) begin
        if (!sda) begin
          if (bus_busy) n_rstart++; else n_start++;
          bus_busy = 1'b1;
          scl_bits = 0;
        end else begin
          n_stop++;
          bus_busy = 1'b0;
        end
      end
      if (!prev_scl && scl) begin
        if (t_rise >= 0 && scl_bits % 9 != 0) min_period = (now - t_rise < min_period) ? now - t_rise : min_period;
        if (t_fall >= 0 && scl_bits % 9 != 0) min_low = (now - t_fall < min_low) ? now - t_fall : min_low;
        t_rise = now;
        scl_bits++;
        // Ninth pulse of a byte the master sent: the slave answers.
        if (scl_bits % 9 == 0 && dut.u_tx.busy) begin
          if (!sda) n_slave_ack++; else n_slave_nack++;
        end
      end
      if (prev_scl && !scl) begin
        min_high = (now - t_rise < min_high) ? now - t_rise : min_high;
        t_fall = now;
      end
      prev_scl = scl;
      prev_sda = sda;
    end
  end

  task automatic xfer(input logic r, input logic [7:0] a, input logic [7:0] d,
                      output int cycles);
    @(negedge clk);
    req = 1'b1; rw = r; addr_in = a; data_in = d;
    @(negedge clk);
    req = 1'b0;
    cycles = 1;
    while (!done && cycles < 200 * 4 * DIV) begin
      @(negedge clk);
      cycles++;
    end
    check(done, "transaction completed");
    check(!busy, "busy dropped with done");
  endtask

  task automatic write_reg(input logic [7:0] a, input logic [7:0] d);
    int cyc;
    xfer(1'b0, a, d, cyc);
    check(!ack_err, $sformatf("write %h acknowledged", a));
    check(cyc >= (WRITE_TICKS - 1) * DIV && cyc <= WRITE_TICKS * DIV + 8,
          $sformatf("write took %0d clocks, budget %0d ticks", cyc, WRITE_TICKS));
    ref_mem[a[5:0]] = d;
  endtask

  task automatic read_reg(input logic [7:0] a);
    int cyc;
    xfer(1'b1, a, 8'h00, cyc);
    check(!ack_err, $sformatf("read %h acknowledged", a));
    check(data_out == ref_mem[a[5:0]],
          $sformatf("read %h got %h expected %h", a, data_out, ref_mem[a[5:0]]));
    check(cyc >= (READ_TICKS - 1) * DIV && cyc <= READ_TICKS * DIV + 12,
          $sformatf("read took %0d clocks, budget %0d ticks", cyc, READ_TICKS));
  endtask

  initial begin
    int cyc, errs0;
    logic [7:0] a, d;
    logic [7:0] regs [8];
    for (int i = 0; i < 64; i++) ref_mem[i] = 8'(i * 7 + 3);
    repeat (5) @(negedge clk);
    reset = 1'b0;
    repeat (10) @(negedge clk);
    check(scl && m_sda, "bus idle after reset");

    // Register never written: the model's power-up contents.
    read_reg(8'h3F);
    // Seconds register and a RAM byte, then random registers.
    write_reg(8'h00, 8'h59);
    read_reg(8'h00);
    write_reg(8'h08, 8'hA5);
    read_reg(8'h08);
    for (int i = 0; i < 8; i++) begin
      regs[i] = 8'($urandom_range(0, 63));
      write_reg(regs[i], 8'($urandom));
    end
    for (int i = 0; i < 8; i++) read_reg(regs[i]);
    check(rtc.n_writes == 10, $sformatf("RTC stored %0d bytes", rtc.n_writes));

    // The RTC refuses its address: both operations end early with ack_err.
    rtc_nack = 1'b1;
    errs0 = n_slave_nack;
    xfer(1'b0, 8'h10, 8'hEE, cyc);
    check(ack_err, "write to a silent slave sets ack_err");
    check(cyc < WRITE_TICKS * DIV, "refused write ends early");
    xfer(1'b1, 8'h10, 8'h00, cyc);
    check(ack_err, "read from a silent slave sets ack_err");
    check(n_slave_nack == errs0 + 2, "two refused address bytes seen on the bus");
    rtc_nack = 1'b0;
    read_reg(8'h10);   // the refused write changed nothing
    write_reg(8'h10, 8'h3C);
    read_reg(8'h10);

    repeat (4 * DIV) @(negedge clk);
    check(scl && sda && !busy, "bus idle at the end");

    // Bus-level and timing checks.
    check(min_period == 4 * DIV, $sformatf("SCL period %0d clocks", min_period));
    check(min_high >= 2 * DIV, $sformatf("SCL high time %0d clocks", min_high));
    check(min_low >= 2 * DIV - 2, $sformatf("SCL low time %0d clocks", min_low));
    check(n_start == 26 && n_stop == 26, $sformatf("%0d START, %0d STOP", n_start, n_stop));
    check(n_rstart == 13, $sformatf("%0d repeated START", n_rstart));
    check(other.n_addressed == 0 && other.n_writes == 0, "other slave never selected");
    check(rtc.n_master_nack == 13, $sformatf("%0d reads closed with NACK", rtc.n_master_nack));

    // Every mechanism must have happened.
    $display("mechanisms: start=%0d rstart=%0d stop=%0d slave_ack=%0d slave_nack=%0d master_nack=%0d writes=%0d reads=%0d",
             n_start, n_rstart, n_stop, n_slave_ack, n_slave_nack, rtc.n_master_nack,
             rtc.n_writes, rtc.n_reads);
    check(n_start > 0, "START seen");
    check(n_rstart > 0, "repeated START seen");
    check(n_stop > 0, "STOP seen");
    check(n_slave_ack > 0, "slave ACK seen");
    check(n_slave_nack > 0, "slave NACK seen");
    check(rtc.n_master_nack > 0, "master NACK seen");
    check(rtc.n_writes > 0 && rtc.n_reads > 0, "writes and reads seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * 200 * DIV) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
