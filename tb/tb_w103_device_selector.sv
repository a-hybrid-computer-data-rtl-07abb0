// tb_w103_device_selector: IOP pulses pass only on a matching device code
// or with force-select.
// Force-select follows the document; device code 23 (octal) is taken from
// its interface diagram.
`timescale 1ns/1ps
module tb_w103_device_selector;
  logic [5:0] ds = '0;
  logic force_sel = 0, iop1 = 0, iop2 = 0, iop4 = 0, iot1, iot2, iot4;
  int checks = 0, failures = 0;

  w103_device_selector #(.DEV_CODE(6'o23)) dut (.ds, .force_sel, .iop1, .iop2, .iop4, .iot1, .iot2, .iot4);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      bit sel;
      ds = ($urandom_range(0, 3) == 0) ? 6'o23 : 6'($urandom);
      force_sel = 1'($urandom); iop1 = 1'($urandom); iop2 = 1'($urandom); iop4 = 1'($urandom);
      #10;
      sel = force_sel || (ds == 6'o23);
      chk(iot1 == (iop1 && sel) && iot2 == (iop2 && sel) && iot4 == (iop4 && sel),
          $sformatf("ds %o force %0b", ds, force_sel));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
