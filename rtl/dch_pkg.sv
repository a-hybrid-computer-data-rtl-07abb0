// dch_pkg: constants and types shared by the data-channel interface.
//
// The interface talks to an 18-bit minicomputer IO bus. Its word-count
// registers live in core at octal 32 (READ, analog data into the computer)
// and octal 22 (WRITE, data out to the MDAC); the two addresses differ only
// in IO ADDR line 14. IO ADDR lines are numbered 4..17 with line 17 the
// least significant bit; here they are packed into a 14-bit vector whose
// index 0 is line 17, so line n sits at index 17-n.
// The core addresses, widths and line numbers follow the document; the
// vector packing and the clock rate are this design's own choices.
package dch_pkg;
  localparam int WORD_W     = 18;  // IO bus word
  localparam int ADC_W      = 12;  // ADC and MDAC word
  localparam int ADDR_LINES = 14;  // IO ADDR lines 4..17

  // Word-count register addresses of the variable-time-delay channel.
  localparam logic [ADDR_LINES-1:0] WC_ADDR_READ  = 14'o32;
  localparam logic [ADDR_LINES-1:0] WC_ADDR_WRITE = 14'o22;

  // Vector index of IO ADDR line 14.
  localparam int IO_ADDR14_IDX = 17 - 14;

  // Mode flip-flop state.
  typedef enum logic {
    MODE_WRITE = 1'b0,
    MODE_READ  = 1'b1
  } mode_e;
endpackage
