// tb_strobing_gate: the ADC word appears left-justified on the IO bus only
// during IOT2.
// The IOT2 strobe follows the document; the bit placement (bits 17..6) is
// this design's choice.
`timescale 1ns/1ps
module tb_strobing_gate;
  logic iot2 = 0;
  logic [11:0] adc_data = '0;
  logic [17:0] io_bus;
  int checks = 0, failures = 0;

  strobing_gate dut (.iot2, .adc_data, .io_bus);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      adc_data = 12'($urandom); iot2 = 1'($urandom);
      #10;
      chk(io_bus == (iot2 ? 18'(adc_data) * 18'd64 : 18'd0), $sformatf("adc %o bus %o", adc_data, io_bus));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
