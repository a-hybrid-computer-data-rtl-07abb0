// tb_pulse_separator: checks that an isolated request passes one clock
// later, that a request inside the other side's 7 us window is delayed to
// the window length plus two clocks after its arrival (on both sides), and,
// over random READ/WRITE pairs, that every output pair is at least 7 us
// apart and no request is lost.
// The 7 us minimum spacing is the document's; the exact W+2 clock delay is
// this design's synchronous timing.
`timescale 1ns/1ps
module tb_pulse_separator;
  localparam int CPU = 2;
  localparam int W = 7 * CPU;  // 7 us in clocks
  logic clk = 0, rst = 1, a_pulse = 0, b_pulse = 0;
  logic rd_req, wr_req;
  int checks = 0, failures = 0, cyc = 0;

  pulse_separator #(.CLK_PER_US(CPU), .SEP_US(7)) dut (.clk, .rst, .a_pulse, .b_pulse, .rd_req, .wr_req);

  always #250 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rd_at = -1000, wr_at = -1000, rd_cnt = 0, wr_cnt = 0, min_gap = 1 << 30;
  always @(negedge clk) if (!rst) begin
    if (rd_req) begin rd_cnt++; rd_at = cyc; if (cyc - wr_at < min_gap) min_gap = cyc - wr_at; end
    if (wr_req) begin wr_cnt++; wr_at = cyc; if (cyc - rd_at < min_gap) min_gap = cyc - rd_at; end
  end

  task automatic pulse_a; @(posedge clk); a_pulse <= 1; @(posedge clk); a_pulse <= 0; endtask
  task automatic pulse_b; @(posedge clk); b_pulse <= 1; @(posedge clk); b_pulse <= 0; endtask

  initial begin
    int t0, na, nb;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    // isolated READ: passes one clock after the shaped pulse
    @(posedge clk); a_pulse <= 1; t0 = cyc + 1;
    @(posedge clk); a_pulse <= 0;
    repeat (3 * W) @(posedge clk);
    chk(rd_at == t0 + 1, $sformatf("isolated READ at +%0d, expected +1", rd_at - t0));
    // WRITE, then READ 2 clocks later: READ passes W+2 clocks after it arrives (W-clock window, end pulse, output register)
    pulse_b();
    @(posedge clk);
    @(posedge clk); a_pulse <= 1; t0 = cyc + 1;
    @(posedge clk); a_pulse <= 0;
    repeat (3 * W) @(posedge clk);
    chk(rd_at == t0 + W + 2, $sformatf("delayed READ at +%0d, expected +%0d", rd_at - t0, W + 2));
    chk(rd_at - wr_at >= W, "delayed READ at least 7 us after WRITE");
    // READ, then WRITE one clock after the window closed: not delayed
    @(posedge clk); a_pulse <= 1;
    @(posedge clk); a_pulse <= 0;
    repeat (W) @(posedge clk);
    b_pulse <= 1; t0 = cyc + 1;
    @(posedge clk); b_pulse <= 0;
    repeat (3 * W) @(posedge clk);
    chk(wr_at == t0 + 1, $sformatf("WRITE after window at +%0d, expected +1", wr_at - t0));
    // READ, then WRITE 2 clocks later: the WRITE is the one held back
    pulse_a();
    @(posedge clk);
    @(posedge clk); b_pulse <= 1; t0 = cyc + 1;
    @(posedge clk); b_pulse <= 0;
    repeat (3 * W) @(posedge clk);
    chk(wr_at == t0 + W + 2, $sformatf("delayed WRITE at +%0d, expected +%0d", wr_at - t0, W + 2));
    chk(wr_at - rd_at >= W, "delayed WRITE at least 7 us after READ");
    // random pairs: one side, then the other 1..2W clocks later (often
    // inside the first window), then a quiet gap longer than two windows
    min_gap = 1 << 30; na = rd_cnt; nb = wr_cnt;
    begin
      int sa = 0, sb = 0;
      for (int i = 0; i < 300; i++) begin
        bit sel;
        sel = $urandom_range(0, 1);
        if (sel) pulse_a(); else pulse_b();
        repeat ($urandom_range(0, 2 * W)) @(posedge clk);
        if (sel) pulse_b(); else pulse_a();
        sa++; sb++;
        repeat (3 * W) @(posedge clk);
      end
      repeat (4 * W) @(posedge clk);
      chk(rd_cnt - na == sa, "random: no READ lost");
      chk(wr_cnt - nb == sb, "random: no WRITE lost");
      chk(min_gap >= W, $sformatf("random: minimum READ/WRITE gap %0d clocks", min_gap));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
