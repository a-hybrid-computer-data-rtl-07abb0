// tb_ie_timing: generates the analog computer's run signals for the
// integral-equation example (1 ms runs: 800 us compute, 200 us reset;
// S1 low pulse ending 970 us into the run; R' high for 40 runs and low for
// 10; 0.01R clock of 10 us period) and checks: 40 output-clock pulses
// 20 us apart in each compute run, one input-clock rising edge per run,
// nothing while control bit 17 is off, and the gated R signals.
// The run timing numbers follow the document's example; the exact shape of
// the S1 pulse and the 0.01R phase are this testbench's own model.
`timescale 1ns/1ps
module tb_ie_timing;
  localparam int CPU = 2;
  logic clk = 0, rst = 1;
  logic ctrl_a17 = 0, r = 0, r_tilde = 1, r_prime = 0, s1 = 1, clk_001r = 0;
  logic rp_g, r_g, rt_g, in_clk, out_clk;
  int checks = 0, failures = 0;
  longint cyc = 0;

  ie_timing dut (.clk, .rst, .ctrl_a17, .r, .r_tilde, .r_prime, .s1, .clk_001r,
                 .rp_g, .r_g, .rt_g, .in_clk, .out_clk);
  always #250 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #200ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Analog-computer timing model, in microseconds from the start.
  int us_in_run, run;
  bit gen = 1;
  always @(posedge clk) if (gen) begin
    cyc <= cyc + 1;
    us_in_run = int'((cyc / CPU) % 1000);
    run       = int'((cyc / CPU) / 1000);
    r        <= (us_in_run < 800);
    r_tilde  <= !(us_in_run < 800);
    s1       <= !(us_in_run >= 960 && us_in_run < 970);
    r_prime  <= ((run % 50) < 40);
    clk_001r <= ((cyc / (5 * CPU)) % 2 == 1);
  end

  // Count output-clock and input-clock rising edges per run.
  logic oc_q = 0, ic_q = 1;
  int oc_run = 0, ic_run = 0, last_oc = -1, bad_gap = 0;
  int runs_seen = 0, runs_ok = 0, off_edges = 0, prev_run = 0;
  always @(negedge clk) if (!rst) begin
    oc_q <= out_clk; ic_q <= in_clk;
    if (out_clk && !oc_q) begin
      if (last_oc >= 0 && oc_run > 0 && int'(cyc) - last_oc != 20 * CPU) bad_gap++;
      last_oc = int'(cyc); oc_run++;
      if (!ctrl_a17) off_edges++;
    end
    if (in_clk && !ic_q) begin ic_run++; if (!ctrl_a17) off_edges++; end
    if (run != prev_run) begin
      if (ctrl_a17 && ((prev_run % 50) < 40) && prev_run > 0) begin
        runs_seen++;
        if (oc_run == 40 && ic_run == 1) runs_ok++;
        else $display("run %0d: %0d output pulses, %0d input edges", prev_run, oc_run, ic_run);
      end
      oc_run = 0; ic_run = 0; prev_run = run;
    end
    chk(rp_g == (r_prime && ctrl_a17), "gated R'");
    chk(r_g == (r && rp_g) && rt_g == (r_tilde && rp_g), "gated R and R~");
  end

  initial begin
    repeat (4) @(posedge clk); rst <= 0;
    // control bit off for the first 3 runs: no clocks at all
    repeat (3 * 1000 * CPU) @(posedge clk);
    chk(off_edges == 0, "no request clocks while control bit 17 is off");
    ctrl_a17 <= 1;
    // run to the end of run 52 (covers the 10-run reset period)
    repeat (50 * 1000 * CPU) @(posedge clk);
    chk(runs_seen >= 35, $sformatf("%0d compute runs observed", runs_seen));
    chk(runs_ok == runs_seen, $sformatf("%0d of %0d runs had 40 output pulses and 1 input edge", runs_ok, runs_seen));
    chk(bad_gap == 0, "output-clock pulses 20 us apart");
    // the divide-by-two flip-flop restarts from zero with every compute
    // interval: leave R while the output clock is high, re-enter, and the
    // output clock must stay low until the next 0.01R edge
    gen = 0;
    @(negedge clk); r = 1; r_prime = 1; clk_001r = 0;
    repeat (4) @(negedge clk);
    clk_001r = 1; repeat (2) @(negedge clk); clk_001r = 0;
    repeat (2) @(negedge clk);
    chk(out_clk, "output clock high after one 0.01R edge");
    r = 0; repeat (3) @(negedge clk);
    chk(!out_clk, "output clock low outside R");
    r = 1; repeat (3) @(negedge clk);
    chk(!out_clk, "output clock starts low in a new compute interval");
    clk_001r = 1; repeat (2) @(negedge clk);
    chk(out_clk, "first 0.01R edge of the interval raises the output clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
