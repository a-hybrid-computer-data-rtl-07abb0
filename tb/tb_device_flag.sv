// tb_device_flag: set by DCH REQ, cleared by CLR FLAG only when not
// repetitive, set wins over a simultaneous clear, reset clears.
// Set/clear behaviour and the repetitive patch follow the document; the
// set-over-clear rule checked here is this design's choice.
`timescale 1ns/1ps
module tb_device_flag;
  logic clk = 0, rst = 1, dch_req_pulse = 0, clr_flag = 0, repetitive = 0, flag;
  int checks = 0, failures = 0;

  device_flag dut (.clk, .rst, .dch_req_pulse, .clr_flag, .repetitive, .flag);
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
    bit model;
    repeat (2) @(posedge clk); rst <= 0;
    @(negedge clk); chk(!flag, "clear after reset");
    model = 0;
    for (int i = 0; i < 400; i++) begin
      bit s, c, r;
      s = ($urandom_range(0, 3) == 0); c = ($urandom_range(0, 2) == 0); r = ($urandom_range(0, 4) == 0);
      dch_req_pulse = s; clr_flag = c; repetitive = r;
      @(negedge clk);
      if (s) model = 1; else if (c && !r) model = 0;
      chk(flag == model, $sformatf("flag %0b expected %0b (s%0b c%0b r%0b)", flag, model, s, c, r));
    end
    dch_req_pulse = 1; @(negedge clk); dch_req_pulse = 0;
    rst = 1; @(negedge clk); rst = 0;
    chk(!flag, "power clear clears the flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
