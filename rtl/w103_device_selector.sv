// w103_device_selector: IOT pulse gating by device code (W103 card).
//
// The computer broadcasts IOP1, IOP2 and IOP4 pulses together with the
// six device-select bits of the current IOT instruction. The selector
// passes the IOP pulses on as IOT1, IOT2 and IOT4 when the select bits equal
// DEV_CODE or when its force-select input is active. In a data-channel
// break the W104's SELECT drives force-select, so the IOP pulses of the
// break reach the device without an IOT instruction. Combinational.
// The force-select use follows the document; the default device code is
// read from a schematic label and is this design's best reading.
module w103_device_selector #(
  parameter logic [5:0] DEV_CODE = 6'o23
) (
  input  logic [5:0] ds,         // device-select bits
  input  logic       force_sel,  // SELECT from the W104
  input  logic       iop1,
  input  logic       iop2,
  input  logic       iop4,
  output logic       iot1,
  output logic       iot2,
  output logic       iot4
);
  logic sel;
  assign sel  = force_sel || (ds == DEV_CODE);
  assign iot1 = iop1 && sel;
  assign iot2 = iop2 && sel;
  assign iot4 = iop4 && sel;
endmodule
