// tdc_chip: one TDC FPGA of the board, 48 LVDS wires sampled every 1.2 ns.
//
// Data path (12 ns clock): the SERDES turns each wire into 10-bit words; the MUX MASK
// chooses between them and the VME-loaded test-data RAM and masks wires; the 480-bit
// words enter the 512-word pipeline (up to 6144 ns of trigger latency). On L1A the
// next of four L2 buffers records L2-length words of the pipeline output; on L2A a
// buffer is copied to the read-out RAM, the edge detector finds up to four hits per
// wire and writes the hit-count (7 words) and hit-data (up to 96 words) read-out
// buffers, which VME reads singly or by CBLT.
//
// XFT path: the same masked words feed the XFT block, which flags hits of 18 wires in
// six programmable windows and sends them to P3 as six 18-bit words per CDF clock on
// the 22 ns clock. These words also go to the XFT DAQ (its own pipeline, four L2
// buffers and read-out buffer) and to the XFT-OUT-RAM.
//
// Clocks: clk_fast (1.2 ns sampling), clk12 and clk22 come from the chip PLL, which
// is not modelled; cdf_clk is the (delayed) CDF clock that times L1A, L2A and B0.
// Each clock has its own synchronous, active-high reset. The chip with CHIP_ID 0
// also drives the front-panel calibration pulse. The block structure follows the
// document's chip data-flow figure; the interfaces between blocks are this design's.
module tdc_chip
  import tdc_pkg::*;
#(
  parameter int          CHIP_ID    = 0,
  parameter int          PIPE_WORDS = PIPE_DEPTH,
  parameter int          L2_WORDS   = L2_DEPTH
) (
  input  logic               clk_fast,
  input  logic               rst_fast,
  input  logic               clk12,
  input  logic               rst12,
  input  logic               clk22,
  input  logic               rst22,
  input  logic               cdf_clk,
  input  logic               l1a,
  input  logic               l2a,
  input  logic               b0,
  input  logic [N_WIRES-1:0] lvds_in,
  input  lbus_req_t          lreq,
  output lbus_rsp_t          lrsp,
  output logic               hc_empty,
  output logic               hd_empty,
  output logic [XFT_W-1:0]   p3_data,
  output logic               p3_strobe,
  input  logic               cal_bp,
  output logic               cal_out,
  output logic               reconfig
);
  localparam int PAW = $clog2(PIPE_WORDS);
  localparam int LAW = $clog2(L2_WORDS);

  // control
  logic               sel_test, xram_run, cal_local;
  logic [N_WIRES-1:0] mask;
  logic [8:0]         pipe_dly, xpipe_dly;
  logic [6:0]         l2_len, xl2_len;
  logic [3:0]         xft_start;
  logic [23:0]        xft_width;
  logic [7:0]         cal_dly;
  logic               tram_wr;
  logic [8:0]         tram_row;
  logic [3:0]         tram_slice;
  logic [31:0]        tram_data;
  // triggers
  logic               tick12, l1a12, l2a12, b012;
  logic               tick22, l1a22, l2a22, b022_unused;
  logic [3:0]         phase12_unused, phase22_unused;
  // data
  logic [WORD_W-1:0]  ser_d, test_d, mm_d, pipe_d, ro_d;
  logic               ro_ready, ro_release;
  logic [LAW-1:0]     ro_raddr;
  logic               l1a_ovf, xl1a_ovf;
  logic [L2_NBUF-1:0] l2_busy_unused;
  logic               hc_wr, hd_wr, hc_pop, hd_pop, hc_room, hd_room;
  logic [31:0]        hc_wdata, hd_wdata, hc_rdata, hd_rdata;
  logic [4:0]         hc_count_unused;
  logic [8:0]         hd_count_unused;
  logic               ed_busy_unused;
  logic [5:0]         xdaq_raddr;
  logic [17:0]        xdaq_rdata;
  logic               xdaq_ready, xdaq_release;
  logic [8:0]         xram_raddr;
  logic [18:0]        xram_rdata;
  logic [9:0]         xram_nwords;

  cdf_sync u_sync12 (.clk(clk12), .rst(rst12), .cdf_clk(cdf_clk), .l1a(l1a), .l2a(l2a), .b0(b0),
                     .tick(tick12), .l1a_p(l1a12), .l2a_p(l2a12), .b0_p(b012), .phase(phase12_unused));
  cdf_sync u_sync22 (.clk(clk22), .rst(rst22), .cdf_clk(cdf_clk), .l1a(l1a), .l2a(l2a), .b0(b0),
                     .tick(tick22), .l1a_p(l1a22), .l2a_p(l2a22), .b0_p(b022_unused), .phase(phase22_unused));

  serdes_rx #(.N(N_WIRES), .SER(SER)) u_serdes (
    .clk_fast(clk_fast), .rst_fast(rst_fast), .din(lvds_in), .clk12(clk12), .dout(ser_d));

  test_data_ram #(.W(WORD_W), .DEPTH(PIPE_WORDS)) u_tram (
    .clk(clk12), .rst(rst12), .wr(tram_wr), .wrow(tram_row[PAW-1:0]), .wslice(tram_slice),
    .wdata(tram_data), .len((PAW+1)'(pipe_dly)), .dout(test_d));

  mux_mask #(.N(N_WIRES), .SER(SER)) u_mux (
    .clk(clk12), .sel_test(sel_test), .mask(mask), .serdes_d(ser_d), .test_d(test_d), .dout(mm_d));

  pipe_ram #(.W(WORD_W), .DEPTH(PIPE_WORDS)) u_pipe (
    .clk(clk12), .rst(rst12), .dly(pipe_dly[PAW-1:0]), .din(mm_d), .dout(pipe_d));

  l2_buffers #(.W(WORD_W), .NBUF(L2_NBUF), .DEPTH(L2_WORDS)) u_l2 (
    .clk(clk12), .rst(rst12), .len((LAW+1)'(l2_len)), .din(pipe_d), .l1a(l1a12), .l2a(l2a12),
    .l1a_overflow(l1a_ovf), .ro_ready(ro_ready), .ro_raddr(ro_raddr), .ro_rdata(ro_d),
    .ro_release(ro_release), .rclk(clk12), .buf_busy(l2_busy_unused));

  edge_detector #(.N(N_WIRES), .SER(SER), .DEPTH(L2_WORDS), .MAXH(MAX_HITS)) u_edge (
    .clk(clk12), .rst(rst12), .chip_id(4'(CHIP_ID)), .len((LAW+1)'(l2_len)),
    .ro_ready(ro_ready), .ro_raddr(ro_raddr), .ro_rdata(ro_d), .ro_release(ro_release),
    .hc_room(hc_room), .hd_room(hd_room), .hc_wr(hc_wr), .hc_data(hc_wdata),
    .hd_wr(hd_wr), .hd_data(hd_wdata), .busy(ed_busy_unused));

  readout_fifo #(.DEPTH(16), .ROOM(7)) u_hc (
    .clk(clk12), .rst(rst12), .wr(hc_wr), .wdata(hc_wdata), .pop(hc_pop), .rdata(hc_rdata),
    .empty(hc_empty), .room(hc_room), .count(hc_count_unused));

  readout_fifo #(.DEPTH(256), .ROOM(96)) u_hd (
    .clk(clk12), .rst(rst12), .wr(hd_wr), .wdata(hd_wdata), .pop(hd_pop), .rdata(hd_rdata),
    .empty(hd_empty), .room(hd_room), .count(hd_count_unused));

  xft_block #(.N(N_WIRES), .SER(SER), .XW(XFT_W), .FIRST(0), .NWIN(XFT_WIN)) u_xft (
    .clk12(clk12), .rst12(rst12), .tick12(tick12), .din(mm_d), .start(xft_start), .width(xft_width),
    .clk22(clk22), .rst22(rst22), .tick22(tick22),
    .p3_data(p3_data), .p3_strobe(p3_strobe));

  xft_daq #(.XW(XFT_W), .PIPE_DEPTH(PIPE_WORDS), .NBUF(L2_NBUF), .DEPTH(L2_WORDS)) u_xdaq (
    .clk22(clk22), .rst22(rst22), .xft_data(p3_data), .l1a(l1a22), .l2a(l2a22),
    .pipe_dly(xpipe_dly[PAW-1:0]), .l2_len((LAW+1)'(xl2_len)), .l1a_overflow(xl1a_ovf),
    .clk12(clk12), .rst12(rst12), .raddr(xdaq_raddr[LAW-1:0]), .rdata(xdaq_rdata),
    .release_req(xdaq_release), .ready(xdaq_ready));

  xft_out_ram #(.XW(XFT_W), .DEPTH(512)) u_xram (
    .clk22(clk22), .rst22(rst22), .run(xram_run), .xft_data(p3_data), .xft_strobe(p3_strobe),
    .rclk(clk12), .raddr(xram_raddr), .rdata(xram_rdata), .nwords(xram_nwords));

  chip_regs u_regs (
    .clk(clk12), .rst(rst12), .req(lreq), .rsp(lrsp),
    .sel_test(sel_test), .xram_run(xram_run), .cal_local(cal_local), .mask(mask),
    .pipe_dly(pipe_dly), .l2_len(l2_len), .xpipe_dly(xpipe_dly), .xl2_len(xl2_len),
    .xft_start(xft_start), .xft_width(xft_width), .cal_dly(cal_dly),
    .tram_wr(tram_wr), .tram_row(tram_row), .tram_slice(tram_slice), .tram_data(tram_data),
    .hc_rdata(hc_rdata), .hc_empty(hc_empty), .hc_pop(hc_pop),
    .hd_rdata(hd_rdata), .hd_empty(hd_empty), .hd_pop(hd_pop),
    .xdaq_raddr(xdaq_raddr), .xdaq_rdata(xdaq_rdata), .xdaq_ready(xdaq_ready),
    .xdaq_release(xdaq_release), .xram_raddr(xram_raddr), .xram_rdata(xram_rdata),
    .xram_nwords(xram_nwords), .l1a_ovf(l1a_ovf | xl1a_ovf), .reconfig(reconfig));

  // calibration pulse: generated in chip 0 only, the other chip passes nothing
  if (CHIP_ID == 0) begin : g_cal
    calib_pulse u_cal (.clk(clk12), .rst(rst12), .b0(b012), .dly(cal_dly), .sel_local(cal_local),
                       .bp_pulse(cal_bp), .cal_out(cal_out));
  end else begin : g_nocal
    assign cal_out = 1'b0;
  end
endmodule
