// tb_mmv: checks the one-shot's window length, end pulse and that a trigger
// during the window is ignored. Expected values come from the stated
// WIDTH; nothing is derived from the module's own counter.
// The 7 us width used in the design is the document's; the
// non-retriggerable behaviour is this design's choice.
`timescale 1ns/1ps
module tb_mmv;
  localparam int unsigned W = 14;
  logic clk = 0, rst = 1, trig = 0;
  logic active, done;
  int checks = 0, failures = 0;

  mmv #(.WIDTH(W)) dut (.clk, .rst, .trig, .active, .done);

  always #250 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_act, n_done, done_at;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    chk(!active && !done, "idle after reset");
    for (int trial = 0; trial < 3; trial++) begin
      trig <= 1;
      @(posedge clk);
      trig <= (trial == 1);  // trial 1: hold trigger high (retrigger attempt)
      n_act = 0; n_done = 0; done_at = -1;
      for (int c = 0; c < 3*W; c++) begin
        @(negedge clk);
        if (active) n_act++;
        if (done) begin n_done++; if (done_at < 0) done_at = c; end
        if (c == W + 2) trig <= 0;
      end
      chk(n_act == W || (trial == 1), $sformatf("window %0d clocks, expected %0d", n_act, W));
      chk(done_at == W, $sformatf("done at %0d, expected %0d", done_at, W));
      if (trial == 1) chk(n_act >= W, "held trigger still gives full window");
      if (trial != 1) chk(n_done == 1, "one done pulse");
      repeat (2 * W) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
