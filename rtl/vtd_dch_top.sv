// vtd_dch_top: hybrid-computer data-channel interface with its
// variable-time-delay front end.
//
// The interface lets the analog computer move words to and from the
// minicomputer's core memory by data-channel (cycle-stealing) breaks. The
// word-count and current-address registers of each transfer direction live
// in core; the interface only raises a request, presents the address of the
// word-count register, and moves the data word. Used as a variable time
// delay, ADC samples are stored at a constant rate (READ breaks) and read
// out to an MDAC at a rate set by a VCO (WRITE breaks); the time a sample
// spends in the circular core buffer is the delay.
//
// Request path: read/write request pulses -> sync_shaper (IO SYNC alignment,
// WRITE first on a tie) -> pulse_separator (7 us apart) -> mode_select
// (mode flip-flop, DCH REQ pulse) -> device_flag -> w104_bus_mux (DCH RQ,
// grant, CLR FLAG, ENA, ENB). ENA drives addr_select (word-count address 32
// octal for READ, 22 for WRITE), ENB drives rq_logic (RD RQ / WR RQ / INC MB)
// and the force-select of the w103_device_selector. IOT2 gates the ADC word
// onto the bus (strobing_gate); IOT4 gives DATA AVAILABLE, which loads
// MDAC0 or MDAC1 (mdac_load) as chosen by `mdac_sel`; their B and D
// timing pulses are brought out like the patch-panel terminals. IO OVERFLOW during a
// break sets MEM OFLO (transfer_control).
//
// Pulse sources: with `ie_mode` low the READ and WRITE requests come from
// the external sampling clock and VCO; with `ie_mode` high they come from
// the integral-equation timing logic (ie_timing): its input clock S1 is the
// READ request and its 20 us output clock the WRITE request. The document
// describes both wirings on the patch panel; the select input is this
// design's way of offering both.
//
// Clocking: everything runs on `clk` with CLK_PER_US clocks per
// microsecond (default 2, an own choice that makes half a microsecond one
// clock). IO SYNC is a one-clock strobe once per microsecond. IO power
// clear is a synchronous active-high reset of every flip-flop.
module vtd_dch_top
  import dch_pkg::*;
#(
  parameter int unsigned CLK_PER_US = 2
) (
  input  logic                  clk,
  input  logic                  io_pwr_clr,
  input  logic                  io_sync,
  // patch-panel choices
  input  logic                  ie_mode,       // 1: integral-equation clocks
  input  logic                  repetitive,    // 1: CLR FLAG not wired to the flag
  input  logic                  vtd_sel,       // 1: IO ADDR 14 from the mode flip-flop
  input  logic                  inc_ena,
  input  logic                  mdac_sel,      // 0: DATA AVAILABLE -> MDAC0, 1: -> MDAC1
  input  logic [ADDR_LINES-1:0] patch_addr,
  // analog-side request sources
  input  logic                  read_pulse_ext,
  input  logic                  write_pulse_ext,
  // integral-equation timing inputs from the analog computer
  input  logic                  ctrl_a17,
  input  logic                  ie_r,
  input  logic                  ie_r_tilde,
  input  logic                  ie_r_prime,
  input  logic                  ie_s1,
  input  logic                  ie_clk_001r,
  output logic                  ie_r_g,
  output logic                  ie_rt_g,
  output logic                  ie_rp_g,
  // data-channel bus
  output logic                  dch_rq,
  input  logic                  dch_gr,
  input  logic                  ena_in,
  output logic                  ena_out,
  output logic                  rd_rq,
  output logic                  wr_rq,
  output logic                  inc_mb,
  output logic [ADDR_LINES-1:0] io_addr,
  input  logic                  io_oflo,
  output logic                  io_oflo_pulse,
  output logic                  mem_oflo,
  // IO bus
  input  logic [5:0]            ds,
  input  logic                  iop1,
  input  logic                  iop2,
  input  logic                  iop4,
  output logic                  iot1,
  input  logic [WORD_W-1:WORD_W-ADC_W] io_bus_in,  // IO bus lines 0..11 (bits 17..6), the ones the MDACs use
  output logic [WORD_W-1:0]     io_bus_out,
  // converters
  input  logic [ADC_W-1:0]      adc_data,
  output logic [ADC_W-1:0]      mdac0_data,
  output logic [ADC_W-1:0]      mdac1_data,
  output logic                  data_available,
  output logic [1:0]            mdac_b,        // B terminals (buffer load), index = MDAC number
  output logic [1:0]            mdac_d,        // D terminals (device load), index = MDAC number
  output logic                  add_to_mem,    // RD RQ and WR RQ together
  // observation of internal events
  output logic                  flag,
  output logic                  ena,
  output logic                  enb,
  output logic                  clr_flag,
  output logic                  rd_req,
  output logic                  wr_req,
  output mode_e                 mode
);
  logic ie_in_clk, ie_out_clk;
  logic read_src, write_src;
  logic a_pulse, b_pulse;
  logic rd_ena, wr_ena, dch_req_pulse;
  logic iot2, iot4;
  logic da0, da1;
  logic [ADC_W-1:0] buf0_unused, buf1_unused;

  ie_timing u_ie (
    .clk, .rst(io_pwr_clr), .ctrl_a17, .r(ie_r), .r_tilde(ie_r_tilde),
    .r_prime(ie_r_prime), .s1(ie_s1), .clk_001r(ie_clk_001r),
    .rp_g(ie_rp_g), .r_g(ie_r_g), .rt_g(ie_rt_g),
    .in_clk(ie_in_clk), .out_clk(ie_out_clk));

  assign read_src  = ie_mode ? ie_in_clk  : read_pulse_ext;
  assign write_src = ie_mode ? ie_out_clk : write_pulse_ext;

  sync_shaper u_shape (
    .clk, .rst(io_pwr_clr), .io_sync,
    .read_pulse(read_src), .write_pulse(write_src),
    .a_pulse, .b_pulse);

  pulse_separator #(.CLK_PER_US(CLK_PER_US)) u_sep (
    .clk, .rst(io_pwr_clr), .a_pulse, .b_pulse, .rd_req, .wr_req);

  mode_select u_mode (
    .clk, .rst(io_pwr_clr), .rd_req, .wr_req,
    .mode, .rd_ena, .wr_ena, .dch_req_pulse);

  device_flag u_flag (
    .clk, .rst(io_pwr_clr), .dch_req_pulse, .clr_flag, .repetitive, .flag);

  w104_bus_mux u_w104 (
    .clk, .rst(io_pwr_clr), .io_sync, .flag, .dch_gr, .ena_in,
    .dch_rq, .clr_flag, .ena, .enb, .ena_out);

  rq_logic u_rq (
    .enb, .rd_ena, .wr_ena, .inc_ena,
    .rd_rq, .wr_rq, .inc_mb, .add_to_mem);

  addr_select u_addr (
    .ena, .vtd_sel, .mode, .patch_addr, .io_addr);

  transfer_control u_xfer (
    .clk, .rst(io_pwr_clr), .io_oflo, .enb, .clr(clr_flag),
    .io_oflo_pulse, .mem_oflo);

  w103_device_selector u_w103 (
    .ds, .force_sel(enb), .iop1, .iop2, .iop4, .iot1, .iot2, .iot4);

  strobing_gate u_strobe (
    .iot2, .adc_data, .io_bus(io_bus_out));

  assign da0 = data_available && !mdac_sel;
  assign da1 = data_available &&  mdac_sel;

  mdac_load #(.CLK_PER_US(CLK_PER_US), .DAC_W(ADC_W)) u_mdac0 (
    .clk, .rst(io_pwr_clr), .iot4, .da_load(da0), .io_bus(io_bus_in),
    .data_available, .b_pulse(mdac_b[0]), .d_pulse(mdac_d[0]),
    .buf_reg(buf0_unused), .dev_reg(mdac0_data));

  logic data_available1_unused;
  mdac_load #(.CLK_PER_US(CLK_PER_US), .DAC_W(ADC_W)) u_mdac1 (
    .clk, .rst(io_pwr_clr), .iot4, .da_load(da1), .io_bus(io_bus_in),
    .data_available(data_available1_unused), .b_pulse(mdac_b[1]), .d_pulse(mdac_d[1]),
    .buf_reg(buf1_unused), .dev_reg(mdac1_data));
endmodule
