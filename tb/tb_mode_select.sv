// tb_mode_select: the mode flip-flop follows the last request, both ENA
// levels are complementary, and every request gives exactly one DCH REQ
// pulse one clock later.
// WRITE winning a same-clock tie and the one-clock DCH REQ delay are this
// design's choices; the mode flip-flop itself follows the document.
`timescale 1ns/1ps
module tb_mode_select;
  import dch_pkg::*;
  logic clk = 0, rst = 1, rd_req = 0, wr_req = 0;
  mode_e mode;
  logic rd_ena, wr_ena, dch_req_pulse;
  int checks = 0, failures = 0;

  mode_select dut (.clk, .rst, .rd_req, .wr_req, .mode, .rd_ena, .wr_ena, .dch_req_pulse);
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
    bit exp_read;
    repeat (2) @(posedge clk); rst <= 0;
    @(negedge clk);
    chk(wr_ena && !rd_ena && !dch_req_pulse, "reset state WRITE, no pulse");
    exp_read = 0;
    for (int i = 0; i < 100; i++) begin
      int r;
      r = $urandom_range(0, 2);   // 0 WRITE, 1 READ, 2 both: WRITE wins
      @(negedge clk); rd_req = (r != 0); wr_req = (r != 1);
      @(negedge clk); rd_req = 0; wr_req = 0;
      exp_read = (r == 1);
      chk(dch_req_pulse, "DCH REQ pulse after request");
      chk(rd_ena == exp_read && wr_ena == !exp_read, "mode follows last request");
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        chk(!dch_req_pulse, "no extra DCH REQ pulse");
        chk(rd_ena == exp_read, "mode holds");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
