// tb_vtd_dch_top: end-to-end test of the data-channel interface used as a
// variable time delay, at the design's default parameters.
//
// A behavioural stand-in for the computer (pdp9_dch_model) provides IO SYNC,
// grants, core memory and the word-count / current-address breaks. The
// testbench keeps its own model of the circular core buffer, updated in the
// order in which it issues READ (store an ADC sample) and WRITE (send the
// next stored word to the MDAC) requests, and compares every word the MDAC
// device register receives with that model. Phases:
//   1. constant delay: READ every 60 us, WRITE 3 us later (each WRITE is
//      held back by the 7 us separation), write pointer D words behind;
//   2. READ and WRITE on the same clock (WRITE must go first);
//   3. variable delay: READ at a fixed rate, WRITE at the rate of a VCO
//      whose input voltage sweeps (150 + 1065 (V - 0.5) Hz);
//   4. DATA AVAILABLE patched to the second MDAC;
//   5. integral-equation wiring: 1 ms analog runs, 40 WRITEs per run from
//      the 20 us output clock and one READ per run from the input clock,
//      over a 40-word recirculating store;
//   6. memory increment (INC ENA) and repetitive flag mode.
// Throughout, D follows B by 1.5 us on the selected MDAC only, ENA OUT is
// ENA IN gated by the request, and the break levels match the mode.
// Each mechanism is counted; one that never happened is a failure.
`timescale 1ns/1ps
module tb_vtd_dch_top;
  import dch_pkg::*;
  localparam int CPU = 2;          // top default CLK_PER_US
  localparam int A   = 'o1000;     // buffer start address
  localparam int N   = 16;         // phase 1-4 buffer length
  localparam int D   = 4;          // phase 1 delay in samples
  localparam int NIE = 40;         // integral-equation store

  logic clk = 0, rst = 1;
  logic io_sync;
  logic ie_mode = 0, repetitive = 0, vtd_sel = 1, inc_ena = 0, mdac_sel = 0;
  logic [13:0] patch_addr = 14'o22;
  logic read_pulse_ext = 0, write_pulse_ext = 0;
  logic ctrl_a17 = 0, ie_r = 0, ie_r_tilde = 1, ie_r_prime = 0, ie_s1 = 1, ie_clk_001r = 0;
  logic ie_r_g, ie_rt_g, ie_rp_g;
  logic dch_rq, dch_gr, ena_out, rd_rq, wr_rq, inc_mb;
  logic [13:0] io_addr;
  logic io_oflo, io_oflo_pulse, mem_oflo;
  logic iop2, iop4, iot1;
  logic [17:0] io_bus_in, io_bus_out;
  logic [11:0] adc_data = '0, mdac0_data, mdac1_data;
  logic [1:0]  mdac_b, mdac_d;
  logic        add_to_mem;
  logic data_available, flag, ena, enb, clr_flag, rd_req, wr_req;
  mode_e mode;

  vtd_dch_top dut (
    .clk, .io_pwr_clr(rst), .io_sync,
    .ie_mode, .repetitive, .vtd_sel, .inc_ena, .mdac_sel, .patch_addr,
    .read_pulse_ext, .write_pulse_ext,
    .ctrl_a17, .ie_r, .ie_r_tilde, .ie_r_prime, .ie_s1, .ie_clk_001r,
    .ie_r_g, .ie_rt_g, .ie_rp_g,
    .dch_rq, .dch_gr, .ena_in(1'b1), .ena_out, .rd_rq, .wr_rq, .inc_mb, .io_addr,
    .io_oflo, .io_oflo_pulse, .mem_oflo,
    .ds(6'o0), .iop1(1'b0), .iop2, .iop4, .iot1, .io_bus_in(io_bus_in[17:6]), .io_bus_out,
    .adc_data, .mdac0_data, .mdac1_data, .data_available, .mdac_b, .mdac_d, .add_to_mem,
    .flag, .ena, .enb, .clr_flag, .rd_req, .wr_req, .mode);

  pdp9_dch_model #(.CLK_PER_US(CPU)) cpu (
    .clk, .rst, .io_sync, .dch_rq, .dch_gr, .rd_rq, .wr_rq, .inc_mb, .io_addr,
    .io_oflo, .iop2, .iop4, .io_bus_in, .io_bus_out);

  always #250 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  logic [11:0] ref_buf [$];     // circular buffer contents (12-bit words)
  int          ref_len, pr, pw; // READ and WRITE positions
  logic [11:0] exp_q [$];       // words the MDAC must receive, in order
  int          sample_no = 0;

  function automatic logic [11:0] sample(int k);
    return 12'((k * 37 + 5) & 12'hFFF);
  endfunction

  function automatic void ref_init(int len, int wr_lag);
    ref_buf.delete();
    for (int i = 0; i < len; i++) ref_buf.push_back('0);
    ref_len = len; pr = 0; pw = (len - wr_lag) % len;
    exp_q.delete();
  endfunction
  function automatic void ref_read(logic [11:0] v);
    ref_buf[pr] = v; pr = (pr + 1) % ref_len;
  endfunction
  function automatic void ref_write();
    exp_q.push_back(ref_buf[pw]); pw = (pw + 1) % ref_len;
  endfunction

  // Channel registers: WC = -len, CA = start - 1 (two's complement, 18 bit);
// after each overflow the computer reloads these values.
  task automatic setup_channels(int len, int wr_lag);
    cpu.set_channel('o32, 18'(-len), 18'(A - 1));
    cpu.set_channel('o22, 18'(-len), 18'(A - 1));
    // the WRITE pointer starts wr_lag words before the end of the buffer;
    // its first overflow brings it back to the start
    if (wr_lag != 0) begin
      cpu.mem['o22] = 18'(-wr_lag);
      cpu.mem['o23] = 18'(A - 1 + len - wr_lag);
    end
    for (int i = 0; i < len; i++) cpu.mem[A + i] = '0;
    ref_init(len, wr_lag);
  endtask

  // ------------------------------------------------------- event counters
  int n_coincide = 0, n_sep_delay = 0, n_mode_sw = 0, n_oflo = 0, n_memoflo = 0;
  int n_clrflag = 0, n_addr32 = 0, n_addr22 = 0, n_mdac0 = 0, n_mdac1 = 0;
  int n_iot2 = 0, n_da = 0, n_ie_wr = 0, n_ie_rd = 0, n_unexpected = 0;
  int n_wr_first = 0;
  // WRITE request edge to MDAC device-register load, in clocks (external pulses only)
  longint clk_no = 0;
  longint t_wr_q [$];   // pending WRITE edges, oldest first
  bit     lat_on = 1;   // phases 1-4 only
  longint last_b [2] = '{-100, -100};   // clock of the last B pulse per MDAC
  int lat_min = 1 << 30, lat_max = 0;
  logic wpe_q = 0;
  mode_e mode_q = MODE_WRITE;
  logic memoflo_q = 0, rdrq_q = 0, wrrq_q = 0, da_q = 0;

  always @(negedge clk) if (!rst) begin
    if (io_sync && dut.u_shape.c_ff && dut.u_shape.d_ff) n_coincide++;
    if (dut.u_sep.a2_done || dut.u_sep.b2_done) n_sep_delay++;
    if (mode != mode_q) n_mode_sw++;
    mode_q <= mode;
    if (io_oflo_pulse) n_oflo++;
    if (mem_oflo && !memoflo_q) n_memoflo++;
    memoflo_q <= mem_oflo;
    if (clr_flag) n_clrflag++;
    if (ena && io_addr == 14'o32) n_addr32++;
    if (ena && io_addr == 14'o22) n_addr22++;
    if (dut.u_w103.iot2) n_iot2++;
    if (data_available && !da_q) n_da++;
    da_q <= data_available;
    rdrq_q <= rd_rq; wrrq_q <= wr_rq;
    if (ena_out != !dch_rq) begin checks++; failures++; $display("FAIL %0t: ENA OUT", $time); end
    if (enb) begin
      chk(rd_rq == (mode == MODE_READ) && wr_rq == (mode == MODE_WRITE), "RD RQ / WR RQ follow the mode during the break");
      chk(io_addr == ((mode == MODE_READ) ? 14'o32 : 14'o22), "word-count address matches the mode");
    end
    // every word the MDAC device registers receive is checked
    clk_no <= clk_no + 1;
    wpe_q  <= write_pulse_ext;
    if (write_pulse_ext && !wpe_q && lat_on) t_wr_q.push_back(clk_no);
    for (int i = 0; i < 2; i++) begin
      if (mdac_b[i]) last_b[i] = clk_no;
      if (mdac_d[i]) chk(clk_no - last_b[i] == 3 * CPU / 2, "D follows B by 1.5 us");
    end
    chk(!add_to_mem, "no add-to-memory request in this wiring");
    if (mdac_d[0] || mdac_d[1]) begin
      logic [11:0] got;
      if (lat_on && t_wr_q.size() != 0) begin
        int lat;
        lat = int'(clk_no - t_wr_q.pop_front());
        if (lat < lat_min) lat_min = lat;
        if (lat > lat_max) lat_max = lat;
      end
      got = mdac_d[0] ? mdac0_data : mdac1_data;
      if (mdac_d[0]) n_mdac0++; else n_mdac1++;
      chk(mdac_d[1] == mdac_sel && mdac_d[0] == !mdac_sel, "word loaded into the selected MDAC");
      if (exp_q.size() == 0) begin
        n_unexpected++;
        chk(0, $sformatf("MDAC word %o with nothing expected", got));
      end else begin
        logic [11:0] e;
        e = exp_q.pop_front();
        chk(got == e, $sformatf("MDAC word %o, expected %o", got, e));
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  task automatic wait_us(int us);
    repeat (us * CPU) @(posedge clk);
  endtask

  task automatic issue(bit rd, bit wr);
    @(posedge clk);
    if (rd) begin
      adc_data <= sample(sample_no);
      ref_read(sample(sample_no));
      sample_no++;
    end
    if (wr) ref_write();   // a tie is served WRITE first
    read_pulse_ext <= rd; write_pulse_ext <= wr;
    wait_us(2);
    read_pulse_ext <= 0; write_pulse_ext <= 0;
  endtask

  // tie: the WRITE must be served first, so model it WRITE then READ
  task automatic issue_tie();
    @(posedge clk);
    ref_write();
    adc_data <= sample(sample_no);
    ref_read(sample(sample_no));
    sample_no++;
    read_pulse_ext <= 1; write_pulse_ext <= 1;
    wait_us(2);
    read_pulse_ext <= 0; write_pulse_ext <= 0;
  endtask

  // analog-computer run timing for phase 5
  bit   ie_run_gen = 0;
  longint ie_cyc = 0;
  always @(posedge clk) if (ie_run_gen) begin
    int us_in_run, run;
    ie_cyc <= ie_cyc + 1;
    us_in_run = int'((ie_cyc / CPU) % 1000);
    run       = int'((ie_cyc / CPU) / 1000);
    ie_r        <= (us_in_run < 800);
    ie_r_tilde  <= !(us_in_run < 800);
    ie_s1       <= !(us_in_run >= 960 && us_in_run < 970);
    ie_r_prime  <= ((run % 50) < 40);
    ie_clk_001r <= ((ie_cyc / (5 * CPU)) % 2 == 1);
  end

  initial begin
    int rd_before, wr_before, brk_before;
    repeat (10) @(posedge clk);
    rst <= 0;
    wait_us(5);

    // ---- phase 1: constant delay of D samples
    setup_channels(N, D);
    for (int k = 0; k < 3 * N; k++) begin
      issue(1, 0);
      wait_us(1);
      issue(0, 1);
      wait_us(55);
    end
    wait_us(100);
    chk(exp_q.size() == 0, $sformatf("phase 1: %0d MDAC words missing", exp_q.size()));

    // ---- phase 2: READ and WRITE together
    rd_before = cpu.n_breaks_rd; wr_before = cpu.n_breaks_wr;
    for (int k = 0; k < 6; k++) begin
      int first_wr;
      issue_tie();
      first_wr = -1;
      for (int c = 0; c < 40 * CPU; c++) begin
        @(negedge clk);
        if (first_wr < 0 && enb) first_wr = wr_rq;
      end
      if (first_wr == 1) n_wr_first++;
      wait_us(40);
    end
    chk(cpu.n_breaks_rd - rd_before == 6 && cpu.n_breaks_wr - wr_before == 6, "phase 2: no request lost");
    chk(n_wr_first == 6, $sformatf("phase 2: WRITE served first in %0d of 6 ties", n_wr_first));
    wait_us(50);
    chk(exp_q.size() == 0, "phase 2: all MDAC words arrived");

    // ---- phase 3: variable delay, VCO sweeping 0.5 V .. 9 V
    begin
      real v, f;
      int t_rd, t_wr, now;
      setup_channels(N, D);
      t_rd = 0; t_wr = 37; now = 0;
      v = 0.5;
      while (now < 20000) begin
        int nxt;
        nxt = (t_rd < t_wr) ? t_rd : t_wr;
        if (t_rd == t_wr) t_wr += 3;  // keep apart; ties are phase 2
        nxt = (t_rd < t_wr) ? t_rd : t_wr;
        wait_us(nxt - now); now = nxt;
        if (t_rd == now) begin issue(1, 0); now += 2; t_rd += 250; end
        else begin
          issue(0, 1); now += 2;
          f = 150.0 + 1065.0 * (v - 0.5);
          t_wr += int'(1.0e6 / f);
          v = v + 0.9; if (v > 9.0) v = 0.5;
        end
        if (t_rd - now < 2 && t_rd >= now) t_rd = now + 2;
        if (t_wr - now < 2 && t_wr >= now) t_wr = now + 2;
        if (t_rd < now) t_rd = now + 2;
        if (t_wr < now) t_wr = now + 2;
      end
      wait_us(100);
      chk(exp_q.size() == 0, $sformatf("phase 3: %0d MDAC words missing", exp_q.size()));
    end

    // ---- phase 4: second MDAC
    mdac_sel = 1;
    for (int k = 0; k < 4; k++) begin issue(1, 0); wait_us(30); issue(0, 1); wait_us(30); end
    wait_us(50);
    mdac_sel = 0;
    chk(exp_q.size() == 0, "phase 4: MDAC1 words arrived");

    // ---- phase 5: integral-equation wiring
    lat_on = 0;
    begin
      int run, prev_run, wr_count, rd_count;
      logic wr_q2, rd_q2;
      // Moving the patch from the external pulses to the run-timing clocks
      // gives one rising edge on the READ input (the idle input clock is
      // high); let that request pass before the channels are set up, as an
      // operator would patch first and then start the program.
      ie_mode = 1;
      wait_us(40);
      setup_channels(NIE, 0);
      ctrl_a17 = 1; ie_run_gen = 1;
      prev_run = 0; wr_count = 0; rd_count = 0; wr_q2 = 0; rd_q2 = 0;
      // at the start of each compute run expect the whole store, then the
      // new sample at the run's slot
      for (run = 0; run < 45; run++) begin
        bit active;
        active = ((run % 50) < 40);
        adc_data <= sample(1000 + run);
        if (active) begin
          for (int i = 0; i < NIE; i++) ref_write();
          ref_read(sample(1000 + run));
        end
        wr_count = 0; rd_count = 0;
        for (int c = 0; c < 1000 * CPU; c++) begin
          @(negedge clk);
          if (wr_rq && !wr_q2) wr_count++;
          if (rd_rq && !rd_q2) rd_count++;
          wr_q2 = wr_rq; rd_q2 = rd_rq;
        end
        if (active) begin
          chk(wr_count == NIE, $sformatf("run %0d: %0d WRITE breaks, expected %0d", run, wr_count, NIE));
          chk(rd_count == 1, $sformatf("run %0d: %0d READ breaks, expected 1", run, rd_count));
          n_ie_wr += wr_count; n_ie_rd += rd_count;
        end else begin
          chk(wr_count == 0 && rd_count == 0, $sformatf("run %0d: no breaks while R' is low", run));
        end
      end
      ie_run_gen = 0; ie_mode = 0; ctrl_a17 = 0;
      wait_us(100);
      chk(exp_q.size() == 0, $sformatf("phase 5: %0d MDAC words missing", exp_q.size()));
    end

    // ---- phase 6a: memory increment during a WRITE break
    begin
      int n0, slot;
      logic [17:0] old_word;
      setup_channels(N, 0);
      slot = A;
      old_word = cpu.mem[slot];
      n0 = cpu.n_inc;
      inc_ena = 1;
      issue(0, 1);
      wait_us(30);
      inc_ena = 0;
      chk(cpu.n_inc == n0 + 1, "INC MB reached the computer");
      chk(cpu.mem[slot] == old_word + 18'd1, "addressed word incremented");
      void'(exp_q.pop_front());   // the word was sent before the increment
      exp_q.delete();
    end
    // ---- phase 6b: repetitive mode keeps the flag up
    begin
      int b0;
      exp_q.delete();
      b0 = cpu.n_breaks_wr;
      repetitive = 1;
      for (int i = 0; i < 40; i++) ref_write();
      issue(0, 1);
      wait_us(60);
      repetitive = 0;
      chk(flag, "flag stays up in repetitive mode");
      chk(cpu.n_breaks_wr - b0 >= 3, $sformatf("repetitive mode: %0d breaks from one request", cpu.n_breaks_wr - b0));
      // one more request clears it through CLR FLAG
      issue(0, 1);
      wait_us(40);
      chk(!flag, "flag cleared again once CLR FLAG is wired");
      exp_q.delete();
    end

    // ---- mechanism coverage
    chk(n_coincide > 0,  $sformatf("coincident requests skipped: %0d", n_coincide));
    chk(n_sep_delay > 0, $sformatf("7 us separation delays: %0d", n_sep_delay));
    chk(n_mode_sw > 0,   $sformatf("mode switches: %0d", n_mode_sw));
    chk(n_oflo > 0,      $sformatf("IO OFLO pulses: %0d", n_oflo));
    chk(n_memoflo > 0,   $sformatf("MEM OFLO sets: %0d", n_memoflo));
    chk(n_clrflag > 0,   $sformatf("CLR FLAG pulses: %0d", n_clrflag));
    chk(n_addr32 > 0 && n_addr22 > 0, "both word-count addresses used");
    chk(n_iot2 > 0,      $sformatf("IOT2 strobes: %0d", n_iot2));
    chk(n_da > 0,        $sformatf("DATA AVAILABLE pulses: %0d", n_da));
    chk(n_mdac0 > 0 && n_mdac1 > 0, $sformatf("MDAC0 loads %0d, MDAC1 loads %0d", n_mdac0, n_mdac1));
    chk(n_ie_wr > 0 && n_ie_rd > 0, "integral-equation clocks drove breaks");
    $display("coverage: ties %0d, separations %0d, mode switches %0d, IO OFLO %0d, MEM OFLO %0d, READ breaks %0d, WRITE breaks %0d, MDAC0 %0d, MDAC1 %0d",
             n_coincide, n_sep_delay, n_mode_sw, n_oflo, n_memoflo, cpu.n_breaks_rd, cpu.n_breaks_wr, n_mdac0, n_mdac1);
    $display("WRITE request to MDAC load: %0d to %0d clocks", lat_min, lat_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
