// tb_rq_logic: the three request levels equal the patched ENA levels gated
// by ENB in the same cycle; add-to-memory when both RD and WR are requested.
// All 16 input combinations are applied; the gating follows the document.
`timescale 1ns/1ps
module tb_rq_logic;
  logic enb = 0, rd_ena = 0, wr_ena = 0, inc_ena = 0;
  logic rd_rq, wr_rq, inc_mb, add_to_mem;
  int checks = 0, failures = 0;

  rq_logic dut (.enb, .rd_ena, .wr_ena, .inc_ena, .rd_rq, .wr_rq, .inc_mb, .add_to_mem);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      logic [3:0] v;
      v = 4'(i);
      {enb, rd_ena, wr_ena, inc_ena} = v;
      #10;
      chk(rd_rq == (v[3] & v[2]), "RD RQ");
      chk(wr_rq == (v[3] & v[1]), "WR RQ");
      chk(inc_mb == (v[3] & v[0]), "INC MB");
      chk(add_to_mem == (v[3] & v[2] & v[1]), "add-to-memory");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
