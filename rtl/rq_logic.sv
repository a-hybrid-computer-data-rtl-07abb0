// rq_logic: RD RQ / WR RQ / INC MB request logic.
//
// During a data-channel break (ENB high) the transfer-direction levels
// patched on the RD ENA, WR ENA and INC ENA terminals are passed to the
// computer: RD ENA alone asks for an input (READ) transfer, WR ENA alone
// for an output (WRITE) transfer, both together for add-to-memory, and
// INC ENA for incrementing the addressed word. Outside a break all three
// are low. Combinational gates, so the levels appear together with ENB.
// The gating by ENB and the meaning of each combination follow the
// document.
module rq_logic (
  input  logic enb,
  input  logic rd_ena,
  input  logic wr_ena,
  input  logic inc_ena,
  output logic rd_rq,
  output logic wr_rq,
  output logic inc_mb,
  output logic add_to_mem   // RD RQ and WR RQ together
);
  assign rd_rq      = enb && rd_ena;
  assign wr_rq      = enb && wr_ena;
  assign inc_mb     = enb && inc_ena;
  assign add_to_mem = rd_rq && wr_rq;
endmodule
