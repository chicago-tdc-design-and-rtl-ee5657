// tdc_board: a 96-channel CDF TDC board, the top of the design.
//
// Two TDC chips (each an FPGA with 48 LVDS wires from two front-panel connectors)
// measure hit times with 1.2 ns sampling, keep the data in a 6144 ns pipeline, hold
// Level-1 accepted events in four L2 buffers and, on Level-2 accept, turn the event
// into hit counts and hit times in VME read-out buffers. Each chip also computes XFT
// trigger flags, sent to P3 as 18 bits plus a strobe per chip. A third FPGA, the VME
// chip, serves VME single cycles and the chained block transfer (CBLT) that reads
// the hit-count (14 words) and hit-data (up to 192 words) buffers of all boards.
//
// Parts without logic are outside this module and appear as ports: the LVDS
// receivers (lvds_in is already digital), the CDF clock delay lines (cdf_clk is the
// delayed CDF clock), the chip PLLs (clk_fast 1.2 ns, clk12 12 ns and clk22 22 ns
// clocks come in, phase-locked to cdf_clk), the VME bus transceivers (VME lines are
// split into inputs, outputs and output enables; open-collector lines are levels
// with 1 = released), and the P3 buffers. cal_bp is the backplane calibration
// pulse and cal_out the front-panel one chosen by chip 0.
//
// Resets: one active-high reset per clock, synchronous to it. reconfig is a one-cycle
// request to reconfigure both TDC FPGAs (from VME or from a chip register).
module tdc_board
  import tdc_pkg::*;
#(
  parameter int PIPE_WORDS = PIPE_DEPTH,
  parameter int L2_WORDS   = L2_DEPTH
) (
  input  logic                   clk_fast,
  input  logic                   rst_fast,
  input  logic                   clk12,
  input  logic                   rst12,
  input  logic                   clk22,
  input  logic                   rst22,
  input  logic                   cdf_clk,
  input  logic                   l1a,
  input  logic                   l2a,
  input  logic                   b0,
  input  logic [2*N_WIRES-1:0]   lvds_in,
  // VME
  input  logic [4:0]             ga_n,
  input  logic                   as_n,
  input  logic [1:0]             ds_n,
  input  logic                   write_n,
  input  logic [5:0]             am,
  input  logic [31:0]            addr,
  input  logic [31:0]            d_in,
  output logic [31:0]            d_out,
  output logic                   d_oe,
  output logic                   dtack_n,
  output logic                   berr_n,
  input  logic                   iackin_n,
  output logic                   iackout_n,
  // XFT to P3, per chip
  output logic [2*XFT_W-1:0]     p3_data,
  output logic [1:0]             p3_strobe,
  // calibration and reconfiguration
  input  logic                   cal_bp,
  output logic                   cal_out,
  output logic                   reconfig
);
  lbus_req_t lreq [2];
  lbus_rsp_t lrsp [2];
  logic [1:0] hc_empty, hd_empty, chip_reconf, cal;
  logic       vme_reconf;

  for (genvar c = 0; c < 2; c++) begin : g_chip
    tdc_chip #(.CHIP_ID(c), .PIPE_WORDS(PIPE_WORDS), .L2_WORDS(L2_WORDS)) u_chip (
      .clk_fast(clk_fast), .rst_fast(rst_fast), .clk12(clk12), .rst12(rst12),
      .clk22(clk22), .rst22(rst22), .cdf_clk(cdf_clk), .l1a(l1a), .l2a(l2a), .b0(b0),
      .lvds_in(lvds_in[c*N_WIRES +: N_WIRES]), .lreq(lreq[c]), .lrsp(lrsp[c]),
      .hc_empty(hc_empty[c]), .hd_empty(hd_empty[c]),
      .p3_data(p3_data[c*XFT_W +: XFT_W]), .p3_strobe(p3_strobe[c]),
      .cal_bp(cal_bp), .cal_out(cal[c]), .reconfig(chip_reconf[c]));
  end

  vme_chip u_vme (
    .clk(clk12), .rst(rst12), .ga_n(ga_n), .as_n(as_n), .ds_n(ds_n), .write_n(write_n),
    .am(am), .addr(addr), .d_in(d_in), .d_out(d_out), .d_oe(d_oe), .dtack_n(dtack_n),
    .berr_n(berr_n), .iackin_n(iackin_n), .iackout_n(iackout_n), .lreq(lreq), .lrsp(lrsp),
    .hc_empty(hc_empty), .hd_empty(hd_empty), .reconfig(vme_reconf));

  assign cal_out  = cal[0];
  assign reconfig = vme_reconf | (|chip_reconf);
endmodule
