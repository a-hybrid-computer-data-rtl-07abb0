// mmv: monostable multivibrator (one-shot) measured in clock cycles.
//
// A trigger while idle opens a window of WIDTH clocks: `active` is high for
// exactly WIDTH cycles starting with the cycle after the trigger, and `done`
// is a one-clock pulse in the cycle after the window closes. A trigger that
// arrives while the window is open is ignored (non-retriggerable).
// The document uses 7 us one-shots (14 clocks at 2 clocks per microsecond);
// counting clocks instead of an RC time constant, and the
// non-retriggerable behaviour, are this design's own choices.
// Synchronous active-high reset.
module mmv #(
  parameter int unsigned WIDTH = 14
) (
  input  logic clk,
  input  logic rst,
  input  logic trig,
  output logic active,
  output logic done
);
  localparam int CW = $clog2(WIDTH + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (cnt != '0) begin
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) done <= 1'b1;
      end else if (trig) begin
        cnt <= CW'(WIDTH);
      end
    end
  end

  assign active = (cnt != '0);
endmodule
