// tb_mdac_load: DA LOAD loads the buffer from the IO bus at once, and the
// device register 1.5 us (3 clocks at 2 clocks per us) later; the device
// register keeps its old value in between. DATA AVAILABLE equals IOT4.
// The 1.5 us B-to-D spacing is the document's; the clock-level timing of
// the B pulse is this design's choice and is checked as such.
`timescale 1ns/1ps
module tb_mdac_load;
  localparam int CPU = 2;
  logic clk = 0, rst = 1, iot4 = 0, da_load = 0;
  logic [17:0] io_bus = '0;  // full bus; the MDAC sees bits 17..6
  logic data_available, b_pulse, d_pulse;
  logic [11:0] buf_reg, dev_reg;
  int checks = 0, failures = 0, cyc = 0;

  mdac_load #(.CLK_PER_US(CPU), .DAC_W(12)) dut (.clk, .rst, .iot4, .da_load, .io_bus(io_bus[17:6]),
    .data_available, .b_pulse, .d_pulse, .buf_reg, .dev_reg);
  always #250 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [11:0] old, w;
    repeat (2) @(posedge clk); rst <= 0;
    @(negedge clk); chk(dev_reg == 0 && buf_reg == 0, "reset");
    iot4 = 1; #1; chk(data_available, "DATA AVAILABLE follows IOT4"); iot4 = 0; #1; chk(!data_available, "DATA AVAILABLE low");
    for (int i = 0; i < 20; i++) begin
      int tb_, td;
      old = dev_reg;
      w = 12'($urandom);
      @(negedge clk);
      io_bus = {w, 6'($urandom)}; da_load = 1;
      @(negedge clk);
      io_bus = 18'($urandom);   // bus changes after the load pulse
      chk(b_pulse && buf_reg == w, "B pulse loads buffer");
      tb_ = cyc; td = -1;
      for (int k = 0; k < 6; k++) begin
        if (d_pulse) td = cyc;
        if (td < 0) chk(dev_reg == old, "device register holds old value before D");
        @(negedge clk);
      end
      da_load = 0;
      chk(td - tb_ == 3 * CPU / 2, $sformatf("B to D %0d clocks, expected %0d", td - tb_, 3 * CPU / 2));
      chk(dev_reg == w, "D pulse loads device register");
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
