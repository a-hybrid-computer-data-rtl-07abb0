// strobing_gate: puts the ADC word on the IO bus during IOT2.
//
// During the IOT2 pulse of an input (READ) break the 12-bit ADC word is
// gated onto the 18-bit IO bus, most significant bit first: ADC bit 0 on
// IO bus line 0, so the word reads as a left-justified fraction of full
// scale. The six low lines carry zeros. Outside IOT2 the gate drives zeros
// (the bus is a wired-OR of such gates). Combinational.
// Gating by IOT2 follows the document; the left justification is this
// design's choice, consistent with the document's scaling of stored words
// by 2^17 - 1 for full scale.
module strobing_gate
  import dch_pkg::*;
(
  input  logic              iot2,
  input  logic [ADC_W-1:0]  adc_data,
  output logic [WORD_W-1:0] io_bus
);
  assign io_bus = iot2 ? {adc_data, {(WORD_W-ADC_W){1'b0}}} : '0;
endmodule
