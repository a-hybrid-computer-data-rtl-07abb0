// pulse_separator: keeps READ and WRITE data-channel requests 7 us apart.
//
// A data-channel output transfer occupies the channel for about 7 us from
// the moment the device flag is raised, so a READ request must not follow
// a WRITE request (or the other way round) more closely than that. Each
// shaped pulse fires its own 7 us one-shot (A' for READ, B' for WRITE).
// A READ pulse that arrives while B' is running fires a second one-shot A''
// and is passed on when A'' ends; otherwise it is passed on at once. WRITE
// is treated the same way with B'' and A'. That is four one-shots, two
// AND functions (pulse with or without the other side's window) and two OR
// functions, as in the document, which also gives the 7 us figure.
// Outputs are registered one-clock pulses; a request passed at once
// appears one clock after its shaped pulse, a delayed one SEP_US *
// CLK_PER_US + 2 clocks after it. The clock-count one-shots are this design's choice.
module pulse_separator #(
  parameter int unsigned CLK_PER_US = 2,
  parameter int unsigned SEP_US     = 7
) (
  input  logic clk,
  input  logic rst,
  input  logic a_pulse,   // shaped READ
  input  logic b_pulse,   // shaped WRITE
  output logic rd_req,    // separated READ request
  output logic wr_req     // separated WRITE request
);
  localparam int unsigned W = CLK_PER_US * SEP_US;

  logic a1_act, b1_act, a2_done, b2_done;
  logic a1_done_unused, b1_done_unused, a2_act_unused, b2_act_unused;

  // A' and B': windows opened by every shaped pulse.
  mmv #(.WIDTH(W)) u_a1 (.clk, .rst, .trig(a_pulse), .active(a1_act), .done(a1_done_unused));
  mmv #(.WIDTH(W)) u_b1 (.clk, .rst, .trig(b_pulse), .active(b1_act), .done(b1_done_unused));
  // A'' and B'': delay a pulse that fell inside the other side's window.
  mmv #(.WIDTH(W)) u_a2 (.clk, .rst, .trig(a_pulse && b1_act), .active(a2_act_unused), .done(a2_done));
  mmv #(.WIDTH(W)) u_b2 (.clk, .rst, .trig(b_pulse && a1_act), .active(b2_act_unused), .done(b2_done));

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_req <= 1'b0;
      wr_req <= 1'b0;
    end else begin
      rd_req <= (a_pulse && !b1_act) || a2_done;
      wr_req <= (b_pulse && !a1_act) || b2_done;
    end
  end
endmodule
