// tb_vtd_delay_1000: the variable-time-delay workload with a 1000-word
// buffer, at the design's default parameters.
//
// The sampling clock and the VCO both run at the VCO's fastest rate (one
// pulse per 110 us, 9.2 kHz to the nearest microsecond below). Each period
// the WRITE request comes first and the READ request 3 us later, so the
// separation logic holds the READ back, and the WRITE always reads the slot
// the next READ is about to overwrite: every sample leaves the buffer
// exactly N sampling periods after it entered. The testbench checks each
// MDAC word against the sample stored N periods earlier (zero while the
// buffer is still filling) and that the time from a sample's READ request
// to the MDAC load of that same sample is N * 110 us within the break
// latencies. It runs 2.2 passes through the buffer (about 0.24 s).
// The buffer size and the 110 us period are the document's example; the
// sample values, the 3 us offset and the tolerance are this testbench's.
`timescale 1ns/1ps
module tb_vtd_delay_1000;
  import dch_pkg::*;
  localparam int CPU   = 2;
  localparam int N     = 1000;     // active core words
  localparam int T_US  = 110;      // sampling and VCO period
  localparam int A     = 'o2000;   // buffer start address
  localparam int NPER  = N * 22 / 10;

  logic clk = 0, rst = 1;
  logic io_sync, dch_rq, dch_gr, ena_out, rd_rq, wr_rq, inc_mb;
  logic [13:0] io_addr;
  logic io_oflo, io_oflo_pulse, mem_oflo, iop2, iop4, iot1;
  logic [17:0] io_bus_in, io_bus_out;
  logic [11:0] adc_data = '0, mdac0_data, mdac1_data;
  logic [1:0]  mdac_b, mdac_d;
  logic        add_to_mem;
  logic read_pulse_ext = 0, write_pulse_ext = 0;
  logic ie_r_g, ie_rt_g, ie_rp_g, data_available, flag, ena, enb, clr_flag, rd_req, wr_req;
  mode_e mode;

  vtd_dch_top dut (
    .clk, .io_pwr_clr(rst), .io_sync,
    .ie_mode(1'b0), .repetitive(1'b0), .vtd_sel(1'b1), .inc_ena(1'b0), .mdac_sel(1'b0),
    .patch_addr(14'o22),
    .read_pulse_ext, .write_pulse_ext,
    .ctrl_a17(1'b0), .ie_r(1'b0), .ie_r_tilde(1'b0), .ie_r_prime(1'b0), .ie_s1(1'b1),
    .ie_clk_001r(1'b0), .ie_r_g, .ie_rt_g, .ie_rp_g,
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
    #1s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample k: distinct over any 4096 consecutive samples
  function automatic logic [11:0] sample(int k);
    return 12'((k * 1237 + 11) % 4096);
  endfunction

  longint clk_no = 0;
  longint t_read [NPER];           // clock of each sample's READ request
  int     n_out = 0, n_wrap = 0;
  longint dly_min = 64'h7fffffffffffffff, dly_max = 0;

  always @(negedge clk) begin
    clk_no <= clk_no + 1;
    if (io_oflo_pulse) n_wrap++;
    if (mdac_d[0]) begin
      // output j is the word written N periods earlier (zero while filling)
      if (n_out < N) begin
        chk(mdac0_data == '0, $sformatf("output %0d: %o while the buffer fills", n_out, mdac0_data));
      end else begin
        longint dly;
        chk(mdac0_data == sample(n_out - N),
            $sformatf("output %0d: %o, expected sample %0d = %o", n_out, mdac0_data, n_out - N, sample(n_out - N)));
        dly = clk_no - t_read[n_out - N];
        if (dly < dly_min) dly_min = dly;
        if (dly > dly_max) dly_max = dly;
      end
      n_out++;
    end
  end

  initial begin
    repeat (10) @(posedge clk);
    rst <= 0;
    // both channels over the same N words, pointers together
    cpu.set_channel('o32, 18'(-N), 18'(A - 1));
    cpu.set_channel('o22, 18'(-N), 18'(A - 1));
    for (int i = 0; i < N; i++) cpu.mem[A + i] = '0;
    repeat (10 * CPU) @(posedge clk);
    for (int k = 0; k < NPER; k++) begin
      @(posedge clk);
      write_pulse_ext <= 1;
      repeat (2 * CPU) @(posedge clk);
      write_pulse_ext <= 0;
      repeat (1 * CPU) @(posedge clk);
      adc_data       <= sample(k);
      read_pulse_ext <= 1;
      t_read[k] = clk_no;
      repeat (2 * CPU) @(posedge clk);
      read_pulse_ext <= 0;
      repeat ((T_US - 5) * CPU - 1) @(posedge clk);
    end
    repeat (50 * CPU) @(posedge clk);
    chk(n_out == NPER, $sformatf("%0d MDAC words for %0d WRITE requests", n_out, NPER));
    chk(n_wrap == 2 * (NPER / N), $sformatf("%0d word-count overflows, expected %0d", n_wrap, 2 * (NPER / N)));
    // delay = N periods, minus the 3 us READ offset, plus the WRITE break
    // latency (IO SYNC alignment, request, grant, break, B to D)
    chk(dly_min >= (N * T_US - 3) * CPU && dly_max <= (N * T_US + 20) * CPU,
        $sformatf("delay %0d..%0d us, expected %0d us", dly_min / CPU, dly_max / CPU, N * T_US));
    $display("delay of %0d words at %0d us: %0d..%0d clocks (%0d us nominal)",
             N, T_US, dly_min, dly_max, N * T_US);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
