// addr_select: word-count register address selection on the IO ADDR lines.
//
// While ENA is high the interface drives the 14 IO ADDR lines (4..17) with
// the address of its word-count register; otherwise it drives all zeros.
// The address is the patched value `patch_addr`. With `vtd_sel` high (the
// variable-time-delay wiring) line 14 is instead the AND of ENA and the
// READ state of the mode flip-flop, so one patched address of octal 22
// becomes octal 32 for READ and stays 22 for WRITE.
// Vector index 0 is line 17 (see dch_pkg). Combinational.
// The gating by ENA, the single-line switch and the two addresses follow the
// document; the `vtd_sel` choice between plain patching and the mode switch
// is how this design models the two ways the panel can be wired.
module addr_select
  import dch_pkg::*;
(
  input  logic                  ena,
  input  logic                  vtd_sel,
  input  mode_e                 mode,
  input  logic [ADDR_LINES-1:0] patch_addr,
  output logic [ADDR_LINES-1:0] io_addr
);
  // The mode switch only works if the two word-count addresses differ in
  // line 14 alone, with the READ one having it set.
  if (WC_ADDR_READ != (WC_ADDR_WRITE | (ADDR_LINES'(1) << IO_ADDR14_IDX))) begin : g_addr_check
    $error("word-count addresses must differ only in IO ADDR line 14");
  end

  always_comb begin
    io_addr = ena ? patch_addr : '0;
    if (vtd_sel) io_addr[IO_ADDR14_IDX] = ena && (mode == MODE_READ);
  end
endmodule
