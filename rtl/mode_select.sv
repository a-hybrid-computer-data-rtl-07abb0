// mode_select: mode flip-flop and DCH REQ OR gate of the variable-time-delay
// logic.
//
// A separated READ request sets the mode flip-flop to READ, a separated
// WRITE request sets it to WRITE. The flip-flop's two outputs drive the
// RD ENA and WR ENA patch terminals of the request logic, and the OR of the
// two requests is the DCH REQ pulse that raises the device flag. Mode and
// DCH REQ pulse are registered on the same clock edge, so the mode is
// already valid when the flag goes up one clock later.
// The flip-flop and the OR gate follow the document; the reset state
// (WRITE) and the rule that WRITE wins if both requests coincide are this
// design's choices (the separator never lets them coincide).
module mode_select
  import dch_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic rd_req,
  input  logic wr_req,
  output mode_e mode,
  output logic rd_ena,         // RD ENA terminal level
  output logic wr_ena,         // WR ENA terminal level
  output logic dch_req_pulse   // to the device flag
);
  always_ff @(posedge clk) begin
    if (rst) begin
      mode          <= MODE_WRITE;
      dch_req_pulse <= 1'b0;
    end else begin
      if (wr_req)      mode <= MODE_WRITE;
      else if (rd_req) mode <= MODE_READ;
      dch_req_pulse <= rd_req || wr_req;
    end
  end

  assign rd_ena = (mode == MODE_READ);
  assign wr_ena = (mode == MODE_WRITE);
endmodule
