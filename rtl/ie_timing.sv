// ie_timing: timing-pulse logic for the integral-equation example.
//
// In the example the delay memory is used as a recirculating store of 40
// function values. The analog computer repeats a 1 ms run (800 us compute,
// 200 us reset); a second mode signal R' is high for the 40 runs of a major
// cycle and low for the next 10. Bit 17 of the computer's control register
// turns the whole arrangement on. This block gates the analog computer's
// signals with that bit and makes the two request clocks:
//   rp_g  = R' while control bit 17 is set (gated R'),
//   r_g   = R  while rp_g is high (track/hold control, gated R),
//   rt_g  = R~ while rp_g is high (complementary track/hold control),
//   out_clk = a flip-flop toggled by the 0.01R clock (10 us period), so a
//           20 us period, allowed only while r_g is high: 40 WRITE requests
//           per 800 us compute period, each moving one stored value to the
//           MDAC,
//   in_clk  = S1 passed through while rp_g is high and held high otherwise;
//           its rising edge (970 us into the run) is the READ request that
//           stores the new ADC value.
// The divider flip-flop is held at zero while r_g is low, so each run's
// output clock starts in step with the run. The signals, the divide-by-two
// flip-flop and the 20 us / 40-pulse timing follow the document; the exact
// gating equations are this design's reading of its timing chart.
// The divider is registered (edges of clk_001r are detected against a
// registered copy); the gates are combinational.
module ie_timing (
  input  logic clk,
  input  logic rst,
  input  logic ctrl_a17,   // control register bit 17
  input  logic r,          // run-mode signal R
  input  logic r_tilde,    // complementary track/hold signal R~
  input  logic r_prime,    // major-cycle signal R'
  input  logic s1,         // input-clock timing signal S1
  input  logic clk_001r,   // 0.01R clock, 10 us period
  output logic rp_g,
  output logic r_g,
  output logic rt_g,
  output logic in_clk,
  output logic out_clk
);
  logic f2, c_q;

  assign rp_g = r_prime && ctrl_a17;
  assign r_g  = r && rp_g;
  assign rt_g = r_tilde && rp_g;

  always_ff @(posedge clk) begin
    if (rst) begin
      f2  <= 1'b0;
      c_q <= 1'b0;
    end else begin
      c_q <= clk_001r;
      if (!r_g)                    f2 <= 1'b0;
      else if (clk_001r && !c_q)   f2 <= !f2;
    end
  end

  assign out_clk = f2 && r_g;
  assign in_clk  = s1 || !rp_g;
endmodule
