// w104_bus_mux: data-channel request and grant sequencer (W104 card).
//
// While the device flag is up, the next IO SYNC strobe sets the REQ
// flip-flop, which drives DCH RQ to the computer. A grant (DCH GR) is
// accepted only while REQ is set and ENA IN is high; accepting it drops
// REQ. The trailing edge of the accepted grant produces a one-clock CLR FLAG
// pulse and sets ENA, which gates the word-count address onto the IO ADDR
// lines. ENA lets the next IO SYNC set ENB; ENB is SELECT (force-select of
// the W103) and gates the RD RQ / WR RQ levels. ENB and ENA stay up for
// BREAK_CYCLES IO SYNC periods, the length of the longest (output) break,
// and then both drop. ENA OUT passes the enable chain on to lower-priority
// devices only while this device is not requesting.
//
// From the document: REQ set by IO SYNC while the flag is up, CLR FLAG and
// ENA from the grant's trailing edge, ENB set by the next IO SYNC, SELECT
// from ENB, the ENA IN / ENA OUT chain and the four-cycle output break.
// This design's choices: REQ drops when the grant is accepted, no new REQ
// while a break is in progress, and ENA/ENB are cleared by counting IO SYNC
// strobes. Synchronous active-high reset (IO power clear).
module w104_bus_mux #(
  parameter int unsigned BREAK_CYCLES = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic io_sync,
  input  logic flag,
  input  logic dch_gr,
  input  logic ena_in,
  output logic dch_rq,
  output logic clr_flag,
  output logic ena,
  output logic enb,
  output logic ena_out
);
  localparam int CW = $clog2(BREAK_CYCLES + 1);

  logic req_ff, taken, gr_q;
  logic [CW-1:0] cyc;

  always_ff @(posedge clk) begin
    if (rst) begin
      req_ff   <= 1'b0;
      taken    <= 1'b0;
      gr_q     <= 1'b0;
      clr_flag <= 1'b0;
      ena      <= 1'b0;
      enb      <= 1'b0;
      cyc      <= '0;
    end else begin
      gr_q     <= dch_gr;
      clr_flag <= 1'b0;

      if (io_sync && flag && !req_ff && !taken && !ena && !enb)
        req_ff <= 1'b1;

      if (dch_gr && req_ff && ena_in) begin
        taken  <= 1'b1;
        req_ff <= 1'b0;
      end

      if (taken && gr_q && !dch_gr) begin
        taken    <= 1'b0;
        clr_flag <= 1'b1;
        ena      <= 1'b1;
      end

      if (ena && !enb && io_sync) begin
        enb <= 1'b1;
        cyc <= '0;
      end else if (enb && io_sync) begin
        if (cyc == CW'(BREAK_CYCLES - 1)) begin
          enb <= 1'b0;
          ena <= 1'b0;
          cyc <= '0;
        end else begin
          cyc <= cyc + 1'b1;
        end
      end
    end
  end

  assign dch_rq  = req_ff;
  assign ena_out = ena_in && !req_ff;

  enb_needs_ena: assert property (@(posedge clk) disable iff (rst) enb |-> ena);
endmodule
