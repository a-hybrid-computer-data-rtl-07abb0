// tb_addr_select: IO ADDR is zero without ENA, the patched address with
// ENA, and with the mode switch wired the word-count address is octal 32 in
// READ mode and octal 22 in WRITE mode.
// The two octal addresses and the single differing line are the document's; the
// random patched addresses are this testbench's stimulus.
`timescale 1ns/1ps
module tb_addr_select;
  import dch_pkg::*;
  logic ena = 0, vtd_sel = 0;
  mode_e mode = MODE_WRITE;
  logic [ADDR_LINES-1:0] patch_addr = '0, io_addr;
  int checks = 0, failures = 0;

  addr_select dut (.ena, .vtd_sel, .mode, .patch_addr, .io_addr);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (io_addr %o)", what, io_addr); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    vtd_sel = 1; patch_addr = 14'o22;
    ena = 1; mode = MODE_READ;  #10; chk(io_addr == 14'o32, "READ selects WC at 32");
    mode = MODE_WRITE;          #10; chk(io_addr == 14'o22, "WRITE selects WC at 22");
    ena = 0; mode = MODE_READ;  #10; chk(io_addr == 14'o0, "no address without ENA");
    vtd_sel = 0;
    for (int i = 0; i < 50; i++) begin
      patch_addr = 14'($urandom);
      ena = 1'($urandom);
      mode = mode_e'($urandom_range(0, 1));
      #10;
      chk(io_addr == (ena ? patch_addr : 14'o0), "plain patched address");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
