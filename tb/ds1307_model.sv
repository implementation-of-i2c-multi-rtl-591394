// ds1307_model: behavioural model of the I2C slave side of a DS1307 RTC.
//
// Not synthesizable; testbench use only. It models what a bus master sees of
// the chip: the 7-bit address (ADDR, 1101000 by default), a 64-byte register
// space (eight clock/calendar registers at 00h-07h and 56 bytes of RAM at
// 08h-3Fh) and the register pointer. A write sets the pointer from the first
// byte after the address and stores further bytes at the pointer, which then
// advances. A read returns the byte at the pointer and advances it, going on
// as long as the master acknowledges; a not-acknowledge ends the read. The
// pointer wraps from 3Fh to 00h. Timekeeping is not modelled; the clock
// registers behave as plain storage.
//
// Bus side: `scl` and `sda` are the line levels; `sda_o` is the model's
// open-drain output (0 pulls low, 1 releases). The model changes SDA only
// after a falling SCL edge and samples on the rising edge. `nack_all` makes
// it ignore its address, as an absent or busy device would.
module ds1307_model #(
  parameter logic [6:0] ADDR = 7'b1101000
) (
  input  logic scl,
  input  logic sda,
  input  logic nack_all,
  output logic sda_o
);

  typedef enum {S_IDLE, S_ADDR, S_ADDR_ACK, S_REG, S_REG_ACK,
                S_WDATA, S_WDATA_ACK, S_RDATA, S_RDATA_ACK} slave_state_e;

  logic [7:0]   mem [64];
  logic [5:0]   ptr;
  slave_state_e st;
  logic [7:0]   shreg;
  int           bitcnt;
  logic         rw;
  logic         master_ack;

  int n_start, n_stop, n_addressed, n_writes, n_reads, n_master_nack;

  initial begin
    for (int i = 0; i < 64; i++) mem[i] = 8'(i * 7 + 3);
    ptr = '0;
    st = S_IDLE;
    sda_o = 1'b1;
    bitcnt = 0;
    shreg = '0;
    rw = 1'b0;
    master_ack = 1'b0;
    n_start = 0; n_stop = 0; n_addressed = 0;
    n_writes = 0; n_reads = 0; n_master_nack = 0;
  end

  // START (or repeated START): SDA falls while SCL is high.
  always @(negedge sda) if (scl === 1'b1) begin
    st = S_ADDR; bitcnt = 0; sda_o = 1'b1; n_start++;
  end

  // STOP: SDA rises while SCL is high.
  always @(posedge sda) if (scl === 1'b1) begin
    st = S_IDLE; sda_o = 1'b1; n_stop++;
  end

  always @(posedge scl) begin
    case (st)
      S_ADDR, S_REG, S_WDATA: begin shreg = {shreg[6:0], sda}; bitcnt++; end
      S_RDATA: bitcnt++;
      S_RDATA_ACK: master_ack = !sda;
      default: ;
    endcase
  end

  always @(negedge scl) begin
    case (st)
      S_ADDR: if (bitcnt == 8) begin
        if (shreg[7:1] == ADDR && !nack_all) begin
          rw = shreg[0]; sda_o = 1'b0; st = S_ADDR_ACK; n_addressed++;
        end else begin
          st = S_IDLE;
        end
      end
      S_ADDR_ACK: begin
        bitcnt = 0;
        if (rw) begin
          st = S_RDATA; shreg = mem[ptr]; sda_o = shreg[7];
        end else begin
          sda_o = 1'b1; st = S_REG;
        end
      end
      S_REG: if (bitcnt == 8) begin
        ptr = shreg[5:0]; sda_o = 1'b0; st = S_REG_ACK;
      end
      S_REG_ACK, S_WDATA_ACK: begin
        sda_o = 1'b1; bitcnt = 0; st = S_WDATA;
      end
      S_WDATA: if (bitcnt == 8) begin
        mem[ptr] = shreg; ptr++; n_writes++; sda_o = 1'b0; st = S_WDATA_ACK;
      end
      S_RDATA: begin
        if (bitcnt == 8) begin
          sda_o = 1'b1; st = S_RDATA_ACK; ptr++; n_reads++;
        end else begin
          sda_o = shreg[7 - bitcnt];
        end
      end
      S_RDATA_ACK: begin
        if (master_ack) begin
          bitcnt = 0; shreg = mem[ptr]; sda_o = shreg[7]; st = S_RDATA;
        end else begin
          n_master_nack++; sda_o = 1'b1; st = S_IDLE;
        end
      end
      default: ;
    endcase
  end

endmodule
