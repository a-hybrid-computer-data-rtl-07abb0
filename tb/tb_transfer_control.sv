// tb_transfer_control: IO OFLO is passed only during a break and latched in
// MEM OFLO until the next clear.
// Gating IO OFLO with ENB and clearing MEM OFLO with CLR FLAG are this
// design's choices; the two signals' meanings follow the document.
`timescale 1ns/1ps
module tb_transfer_control;
  logic clk = 0, rst = 1, io_oflo = 0, enb = 0, clr = 0, io_oflo_pulse, mem_oflo;
  int checks = 0, failures = 0;

  transfer_control dut (.clk, .rst, .io_oflo, .enb, .clr, .io_oflo_pulse, .mem_oflo);
  always #250 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit m;
    repeat (2) @(posedge clk); rst <= 0;
    @(negedge clk); chk(!mem_oflo && !io_oflo_pulse, "reset state");
    m = 0;
    for (int i = 0; i < 300; i++) begin
      bit o, e, c;
      o = ($urandom_range(0, 3) == 0); e = $urandom_range(0, 1); c = ($urandom_range(0, 5) == 0);
      io_oflo = o; enb = e; clr = c;
      @(negedge clk);
      if (o && e) m = 1; else if (c) m = 0;
      chk(io_oflo_pulse == (o && e), "IO OFLO pulse only within a break");
      chk(mem_oflo == m, "MEM OFLO latch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
