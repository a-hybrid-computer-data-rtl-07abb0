// pdp9_dch_model: behavioural stand-in for the 18-bit minicomputer side of
// the data channel, for simulation only (not synthesizable).
//
// It produces IO SYNC (a one-clock strobe every CLK_PER_US clocks), answers
// DCH RQ with a half-microsecond grant at an IO SYNC about 2 us after the
// request appeared, and runs the memory-implemented break that follows:
//   ENB period 1 (WC): at its end the word count at IO ADDR is incremented;
//                      reaching zero gives a one-clock IO OVERFLOW pulse.
//   ENB period 2 (CA): the current address at IO ADDR + 1 is incremented,
//                      giving the effective address. For an input (RD RQ)
//                      break IOP2 is high for this period and the IO bus is
//                      stored at the effective address at its end.
//   ENB period 4:      for an output (WR RQ) break the word at the
//                      effective address is put on the bus with a one-clock
//                      IOP4 pulse. With INC MB the word is also incremented.
// Core memory is MEM_WORDS words. When a word count overflows, the
// register pair is set back to the values given with `set_channel`, as the
// polling service routine of the application program does, so the buffer
// becomes an endless loop.
// The order of the break cycles, the four-cycle output break and the 2 us
// grant delay follow the document's description of the channel; the exact
// clock on which IOP2 and IOP4 occur is this model's choice.
`timescale 1ns/1ps
module pdp9_dch_model #(
  parameter int unsigned CLK_PER_US = 2,
  parameter int unsigned MEM_WORDS  = 8192
) (
  input  logic        clk,
  input  logic        rst,
  output logic        io_sync,
  input  logic        dch_rq,
  output logic        dch_gr,
  input  logic        rd_rq,
  input  logic        wr_rq,
  input  logic        inc_mb,
  input  logic [13:0] io_addr,
  output logic        io_oflo,
  output logic        iop2,
  output logic        iop4,
  output logic [17:0] io_bus_in,   // to the device
  input  logic [17:0] io_bus_out   // from the device
);
  logic [17:0] mem [MEM_WORDS];
  logic [17:0] wc_init [MEM_WORDS];
  logic [17:0] ca_init [MEM_WORDS];
  bit          reinit_en [MEM_WORDS];

  int unsigned cyc = 0;
  int n_breaks_rd = 0, n_breaks_wr = 0, n_oflo = 0, n_inc = 0;
  int last_break_addr = -1;
  logic [17:0] last_data = '0;

  always @(posedge clk) begin
    cyc     <= cyc + 1;
    io_sync <= ((cyc % CLK_PER_US) == 0);
  end

  function automatic void set_channel(int wc_addr, logic [17:0] wc, logic [17:0] ca);
    mem[wc_addr]     = wc;
    mem[wc_addr + 1] = ca;
    wc_init[wc_addr] = wc;
    ca_init[wc_addr] = ca;
    reinit_en[wc_addr] = 1;
  endfunction

  task automatic wait_sync;
    @(posedge clk);
    while (!io_sync) @(posedge clk);
  endtask

  initial begin
    dch_gr = 0; io_oflo = 0; iop2 = 0; iop4 = 0; io_bus_in = '0; io_sync = 0;
    foreach (reinit_en[i]) reinit_en[i] = 0;
    @(negedge rst);
    forever begin
      int addr, ea;
      bit rd, wr, inc;
      logic [17:0] wc;
      // request seen at an IO SYNC
      wait_sync();
      if (!dch_rq) continue;
      // grant at the following IO SYNC, half a microsecond
      wait_sync();
      dch_gr <= 1;
      @(posedge clk);
      dch_gr <= 0;
      // wait for the break levels (ENB)
      do @(posedge clk); while (!(rd_rq || wr_rq || inc_mb));
      addr = int'(io_addr); rd = rd_rq; wr = wr_rq; inc = inc_mb;
      last_break_addr = addr;
      // end of WC period
      wait_sync();
      wc = mem[addr] + 18'd1;
      mem[addr] = wc;
      if (wc == 0) begin
        io_oflo <= 1; n_oflo++;
        @(posedge clk);
        io_oflo <= 0;
      end
      // CA period
      mem[addr + 1] = mem[addr + 1] + 18'd1;
      ea = int'(mem[addr + 1]) % MEM_WORDS;
      if (rd) iop2 <= 1;
      do @(posedge clk); while (!io_sync);
      if (rd) begin
        mem[ea] = io_bus_out;       // value strobed during IOP2
        last_data = io_bus_out;
        iop2 <= 0;
        n_breaks_rd++;
      end
      // first DATA period
      wait_sync();
      // second DATA period: output word with IOP4
      if (wr) begin
        io_bus_in <= mem[ea];
        last_data = mem[ea];
        iop4 <= 1;
        @(posedge clk);
        iop4 <= 0;
        n_breaks_wr++;
      end
      if (inc) begin mem[ea] = mem[ea] + 18'd1; n_inc++; end
      // service routine: endless loop
      if (wc == 0 && reinit_en[addr]) begin
        mem[addr]     = wc_init[addr];
        mem[addr + 1] = ca_init[addr];
      end
    end
  end
endmodule
