// tb_w104_bus_mux: flag -> DCH RQ at the next IO SYNC, grant accepted only
// with ENA IN, CLR FLAG and ENA at the grant's trailing edge, ENB at the
// next IO SYNC, ENB/ENA held for four IO SYNC periods, ENA OUT blocked while
// requesting, and a full break within 8 us of the flag (the document's
// 7 us plus the register stages of this synchronous model).
`timescale 1ns/1ps
module tb_w104_bus_mux;
  localparam int CPU = 2;
  logic clk = 0, rst = 1, io_sync = 0, flag = 0, dch_gr = 0, ena_in = 1;
  logic dch_rq, clr_flag, ena, enb, ena_out;
  int checks = 0, failures = 0, cyc = 0;

  w104_bus_mux #(.BREAK_CYCLES(4)) dut (.clk, .rst, .io_sync, .flag, .dch_gr, .ena_in,
    .dch_rq, .clr_flag, .ena, .enb, .ena_out);
  always #250 clk = ~clk;
  always @(posedge clk) begin cyc <= cyc + 1; io_sync <= (cyc % CPU == 0); end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #5ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Clear the flag on CLR FLAG, as the device flag does.
  always @(posedge clk) if (clr_flag) flag <= 0;

  int enb_len, t_flag, t_end;
  initial begin
    repeat (4) @(posedge clk); rst <= 0;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 20; n++) begin
      ena_in <= 1;
      @(posedge clk); while (!io_sync) @(posedge clk);  // align to an IO SYNC
      flag <= 1; t_flag = cyc;
      // DCH RQ comes with the next IO SYNC
      repeat (2 * CPU + 1) begin @(negedge clk); if (dch_rq) break; end
      chk(dch_rq, "DCH RQ raised");
      chk(!ena_out, "ENA OUT blocked while requesting");
      // grant refused while ENA IN is low (odd trials)
      if (n % 2) begin
        ena_in <= 0;
        @(posedge clk); dch_gr <= 1; @(posedge clk); dch_gr <= 0;
        repeat (3) @(negedge clk);
        chk(dch_rq && !ena && !clr_flag, "grant ignored without ENA IN");
        ena_in <= 1;
      end
      // processor grants at an IO SYNC about 2 us after the flag, half a
      // microsecond long
      @(posedge clk); while (cyc < t_flag + 2 * CPU - 1 || !io_sync) @(posedge clk);
      dch_gr <= 1; @(posedge clk); dch_gr <= 0;
      @(negedge clk); chk(!dch_rq, "REQ dropped on grant");
      @(negedge clk); chk(clr_flag && ena, "CLR FLAG and ENA at the grant's trailing edge");
      chk(!enb, "ENB waits for the next IO SYNC");
      enb_len = 0;
      while (!enb) @(negedge clk);
      while (enb) begin chk(ena, "ENA up during ENB"); enb_len++; @(negedge clk); end
      t_end = cyc;
      chk(!ena, "ENA drops with ENB");
      chk(enb_len == 4 * CPU, $sformatf("ENB %0d clocks, expected %0d", enb_len, 4 * CPU));
      if (n % 2 == 0)
        chk(t_end - t_flag <= 8 * CPU + 1, $sformatf("break ends %0d clocks after the flag", t_end - t_flag));
      chk(!dch_rq && !flag, "no second request from one flag");
      repeat (4) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
