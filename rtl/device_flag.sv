// device_flag: the device data-request flag.
//
// The flag is set by a DCH REQ pulse and asks the W104 bus multiplexer for a
// data-channel break. When repetitive transfers are not wanted (as in the
// variable-time-delay use) CLR FLAG from the W104 clears it, so one request
// pulse produces exactly one transfer; with `repetitive` high CLR FLAG is
// ignored and the flag stays up for back-to-back transfers. IO power clear
// resets it. A set pulse that coincides with CLR FLAG wins, so a request is
// never lost. Registered: the flag changes one clock after its inputs.
// Set, clear by CLR FLAG and by power clear follow the document; the
// `repetitive` input models the patch choice of leaving CLR FLAG unwired.
module device_flag (
  input  logic clk,
  input  logic rst,            // IO power clear
  input  logic dch_req_pulse,
  input  logic clr_flag,
  input  logic repetitive,
  output logic flag
);
  always_ff @(posedge clk) begin
    if (rst)                            flag <= 1'b0;
    else if (dch_req_pulse)             flag <= 1'b1;
    else if (clr_flag && !repetitive)   flag <= 1'b0;
  end
endmodule
