// mdac_load: write control and double-buffered MDAC register.
//
// An output (WRITE) break ends with IOT4 while the word is on the IO bus.
// The write control turns IOT4 into DATA AVAILABLE. A rising edge on DA LOAD
// (patched from DATA AVAILABLE) makes two timing pulses 1.5 us apart: B
// loads the buffer register from the IO bus in that same clock, and D
// copies the buffer register into the device register that feeds the
// converter. The two stages let the converter hold its old value until the
// new word is complete.
// Timing: the buffer register loads at the clock edge where DA LOAD is
// first seen high, and `b_pulse` is high in the following clock; the device
// register loads GAP_CLKS clocks later, together with `d_pulse`. DATA
// AVAILABLE is IOT4 itself (combinational). The B/D pair, the 1.5 us spacing and the two
// registers follow the document; the MDAC width (DAC_W) and its wiring to
// the most significant IO bus lines (the parent connects only those) are
// this design's choice.
module mdac_load
  import dch_pkg::*;
#(
  parameter int unsigned CLK_PER_US = 2,
  parameter int unsigned DAC_W      = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              iot4,
  input  logic              da_load,
  input  logic [DAC_W-1:0]  io_bus,   // the DAC_W most significant IO bus lines
  output logic              data_available,
  output logic              b_pulse,
  output logic              d_pulse,
  output logic [DAC_W-1:0]  buf_reg,
  output logic [DAC_W-1:0]  dev_reg
);
  // 1.5 us between B and D.
  localparam int unsigned GAP_CLKS = (3 * CLK_PER_US) / 2;
  localparam int CW = $clog2(GAP_CLKS + 1);

  logic          ld_q;
  logic [CW-1:0] cnt;

  assign data_available = iot4;

  always_ff @(posedge clk) begin
    if (rst) begin
      ld_q    <= 1'b0;
      cnt     <= '0;
      b_pulse <= 1'b0;
      d_pulse <= 1'b0;
      buf_reg <= '0;
      dev_reg <= '0;
    end else begin
      ld_q    <= da_load;
      b_pulse <= 1'b0;
      d_pulse <= 1'b0;
      if (da_load && !ld_q) begin
        buf_reg <= io_bus;
        b_pulse <= 1'b1;
        cnt     <= CW'(GAP_CLKS);
      end else if (cnt != '0) begin
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          d_pulse <= 1'b1;
          dev_reg <= buf_reg;
        end
      end
    end
  end
endmodule
