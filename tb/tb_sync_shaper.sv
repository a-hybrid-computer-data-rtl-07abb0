// tb_sync_shaper: directed cases (READ alone, WRITE alone, both on the same
// clock, WRITE arriving between IO SYNCs) and a random run that checks no
// request is lost, A and B never overlap, and every shaped pulse follows an
// IO SYNC strobe.
// WRITE priority and IO SYNC alignment follow the document; the clock-level
// pending/shaped flip-flop timing is this design's.
`timescale 1ns/1ps
module tb_sync_shaper;
  logic clk = 0, rst = 1, io_sync = 0;
  logic read_pulse = 0, write_pulse = 0;
  logic a_pulse, b_pulse;
  int checks = 0, failures = 0;
  int cyc = 0;

  sync_shaper dut (.clk, .rst, .io_sync, .read_pulse, .write_pulse, .a_pulse, .b_pulse);

  always #250 clk = ~clk;
  // IO SYNC: one clock in two (1 us period at 2 clocks per us).
  always @(posedge clk) begin cyc <= cyc + 1; io_sync <= (cyc % 2 == 0); end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Record pulse arrival cycles.
  int a_cnt = 0, b_cnt = 0, a_at = -1, b_at = -1;
  logic sync_q;
  always @(posedge clk) sync_q <= io_sync;
  always @(negedge clk) if (!rst) begin
    if (a_pulse) begin a_cnt++; a_at = cyc; end
    if (b_pulse) begin b_cnt++; b_at = cyc; end
    if (a_pulse || b_pulse) chk(sync_q, "shaped pulse follows an IO SYNC");
    chk(!(a_pulse && b_pulse), "A and B exclusive");
  end

  task automatic raise(input bit r, input bit w);
    @(posedge clk);
    read_pulse <= r; write_pulse <= w;
    repeat (4) @(posedge clk);
    read_pulse <= 0; write_pulse <= 0;
    repeat (8) @(posedge clk);
  endtask

  initial begin
    int ea, eb;
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    // READ alone
    a_at = -1; b_at = -1; ea = a_cnt; eb = b_cnt;
    raise(1, 0);
    chk(a_cnt == ea + 1 && b_cnt == eb, "READ alone gives one A pulse");
    // WRITE alone
    ea = a_cnt; eb = b_cnt;
    raise(0, 1);
    chk(b_cnt == eb + 1 && a_cnt == ea, "WRITE alone gives one B pulse");
    // both together: WRITE first, READ one IO SYNC (2 clocks) later
    a_at = -1; b_at = -1; ea = a_cnt; eb = b_cnt;
    raise(1, 1);
    chk(a_cnt == ea + 1 && b_cnt == eb + 1, "both give one pulse each");
    chk(b_at >= 0 && a_at == b_at + 2, $sformatf("WRITE first, READ one sync later (b %0d a %0d)", b_at, a_at));
    // random edges, spaced at least 3 us apart per input
    begin
      int nr = 0, nw = 0;
      ea = a_cnt; eb = b_cnt;
      for (int i = 0; i < 200; i++) begin
        bit r, w;
        r = $urandom_range(0, 1); w = $urandom_range(0, 1);
        nr += r; nw += w;
        @(posedge clk);
        read_pulse <= r; write_pulse <= w;
        repeat ($urandom_range(1, 3)) @(posedge clk);
        read_pulse <= 0; write_pulse <= 0;
        repeat ($urandom_range(4, 8)) @(posedge clk);
      end
      repeat (10) @(posedge clk);
      chk(a_cnt - ea == nr, $sformatf("random: %0d READ edges, %0d A pulses", nr, a_cnt - ea));
      chk(b_cnt - eb == nw, $sformatf("random: %0d WRITE edges, %0d B pulses", nw, b_cnt - eb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
