// sync_shaper: pulse shaping and skipping for the READ and WRITE requests.
//
// The READ request (data sampling clock) and the WRITE request (VCO) come
// from the analog computer at arbitrary times. A positive-going edge on
// either sets a pending flip-flop (C for READ, D for WRITE). At each IO SYNC
// strobe one pending request is turned into a shaped pulse: `b_pulse`
// (B flip-flop, WRITE) if D is pending, otherwise `a_pulse` (A flip-flop,
// READ). When both are pending at the same IO SYNC the WRITE pulse goes
// first and the READ pulse waits one IO SYNC, so A and B are never high
// together. Each shaped pulse is one clock long, i.e. half a microsecond at
// the default 2 clocks per microsecond.
//
// The flip-flop names, the IO SYNC alignment, the half-microsecond width
// and the priority of WRITE follow the document; detecting the edges with
// a registered copy of the input and the one-clock width are this design's
// choices. Timing: a shaped pulse appears in the clock after the first
// IO SYNC strobe that follows the registered edge.
module sync_shaper (
  input  logic clk,
  input  logic rst,          // IO power clear
  input  logic io_sync,      // one-clock strobe per microsecond
  input  logic read_pulse,   // raw READ request level
  input  logic write_pulse,  // raw WRITE request level
  output logic a_pulse,      // shaped READ pulse
  output logic b_pulse       // shaped WRITE pulse
);
  logic rd_q, wr_q;  // previous input levels
  logic c_ff, d_ff;  // pending READ / WRITE

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q    <= 1'b0;
      wr_q    <= 1'b0;
      c_ff    <= 1'b0;
      d_ff    <= 1'b0;
      a_pulse <= 1'b0;
      b_pulse <= 1'b0;
    end else begin
      rd_q    <= read_pulse;
      wr_q    <= write_pulse;
      a_pulse <= 1'b0;
      b_pulse <= 1'b0;
      if (io_sync && d_ff) begin
        b_pulse <= 1'b1;
        d_ff    <= 1'b0;
      end else if (io_sync && c_ff) begin
        a_pulse <= 1'b1;
        c_ff    <= 1'b0;
      end
      // A new edge wins over the clear above so no request is lost.
      if (read_pulse && !rd_q)  c_ff <= 1'b1;
      if (write_pulse && !wr_q) d_ff <= 1'b1;
    end
  end

  a_b_exclusive: assert property (@(posedge clk) disable iff (rst) !(a_pulse && b_pulse));
endmodule
