// transfer_control: IO OFLO / MEM OFLO transfer-complete logic.
//
// The computer sends an IO OVERFLOW pulse when a word count passes through
// zero, i.e. the block of words set up in the word-count register has been
// transferred. Only an overflow that happens during this device's break
// (ENB high) is taken. It is passed on as a one-clock IO OFLO pulse to the
// patch panel and latched in the MEM OFLO flag, which stays up until `clr`
// (wired in the top to the CLR FLAG of the next break) or IO power clear.
// IO OFLO and MEM OFLO follow the document; qualifying with ENB and the
// clearing rule of MEM OFLO are this design's choices. Registered outputs.
module transfer_control (
  input  logic clk,
  input  logic rst,
  input  logic io_oflo,
  input  logic enb,
  input  logic clr,
  output logic io_oflo_pulse,
  output logic mem_oflo
);
  always_ff @(posedge clk) begin
    if (rst) begin
      io_oflo_pulse <= 1'b0;
      mem_oflo      <= 1'b0;
    end else begin
      io_oflo_pulse <= io_oflo && enb;
      if (io_oflo && enb) mem_oflo <= 1'b1;
      else if (clr)       mem_oflo <= 1'b0;
    end
  end
endmodule
