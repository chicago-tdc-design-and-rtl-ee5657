// chip_regs: the VME access port of a TDC chip (local-bus register file).
//
// The VME chip reaches each TDC chip over a local bus (tdc_pkg::lbus_req_t): a
// one-cycle rd or wr strobe with a 16-bit word address, answered one cycle later by
// ack with read data. Status word (A_STATUS): [0] hit-count buffer empty, [1] hit-data
// buffer empty, [2] XFT DAQ read-out ready, [3] an L1A was dropped, [25:16] words in
// the XFT-OUT-RAM. A write to A_CTRL bit 9 clears the dropped-L1A flag. This block holds the chip's control registers, loads the
// test-data RAM, pops the hit-count and hit-data read-out buffers, and reads the XFT
// DAQ read-out buffer and the XFT-OUT-RAM. Register addresses are in tdc_pkg. RAM
// reads use the one-cycle latency of the memories: the address is passed straight
// from the request and the data is picked up in the ack cycle.
//
// Reset values give a working chip: SERDES source, no mask, pipe size 100 words
// (1.2 us), L2 length 34 words (the length the document simulated), XFT windows
// 2 cycles each from cycle 0. The register map and reset values are this design's
// choices; the document says only that these quantities are VME-programmable.
// A write to A_CTRL bit 8 gives a one-cycle reconfiguration request (reconfig).
module chip_regs
  import tdc_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  lbus_req_t    req,
  output lbus_rsp_t    rsp,
  // control outputs
  output logic         sel_test,
  output logic         xram_run,
  output logic         cal_local,
  output logic [N_WIRES-1:0] mask,
  output logic [8:0]   pipe_dly,
  output logic [6:0]   l2_len,
  output logic [8:0]   xpipe_dly,
  output logic [6:0]   xl2_len,
  output logic [3:0]   xft_start,
  output logic [23:0]  xft_width,
  output logic [7:0]   cal_dly,
  // test-data RAM load
  output logic         tram_wr,
  output logic [8:0]   tram_row,
  output logic [3:0]   tram_slice,
  output logic [31:0]  tram_data,
  // read-out buffers
  input  logic [31:0]  hc_rdata,
  input  logic         hc_empty,
  output logic         hc_pop,
  input  logic [31:0]  hd_rdata,
  input  logic         hd_empty,
  output logic         hd_pop,
  // XFT DAQ read-out buffer and XFT-OUT-RAM
  output logic [5:0]   xdaq_raddr,
  input  logic [17:0]  xdaq_rdata,
  input  logic         xdaq_ready,
  output logic         xdaq_release,
  output logic [8:0]   xram_raddr,
  input  logic [18:0]  xram_rdata,
  input  logic [9:0]   xram_nwords,
  input  logic         l1a_ovf,
  output logic         reconfig
);
  typedef enum logic [1:0] {R_REG, R_XDAQ, R_XRAM} rsrc_e;
  rsrc_e       rsrc;
  logic [31:0] rreg;
  logic        l1a_ovf_seen;
  logic        rsp_ack;
  logic [31:0] rsp_rdata;

  assign rsp = '{ack: rsp_ack, rdata: rsp_rdata};

  assign tram_wr    = req.wr && (req.addr[15:13] == A_TRAM_BASE[15:13]);
  assign tram_row   = req.addr[12:4];
  assign tram_slice = req.addr[3:0];
  assign tram_data  = req.wdata;
  assign xdaq_raddr = req.addr[5:0];
  assign xram_raddr = req.addr[8:0];
  assign hc_pop     = req.rd && req.addr == A_HITCOUNT;
  assign hd_pop     = req.rd && req.addr == A_HITDATA;
  assign xdaq_release = req.wr && req.addr == A_XDAQ_BASE;

  always_ff @(posedge clk) begin
    if (rst) begin
      sel_test <= 1'b0; xram_run <= 1'b0; cal_local <= 1'b0;
      mask <= '0;
      pipe_dly <= 9'd100; l2_len <= 7'd34;
      xpipe_dly <= 9'd50; xl2_len <= 7'd34;
      xft_start <= 4'd0; xft_width <= {6{4'd2}};
      cal_dly <= 8'd0;
      reconfig <= 1'b0;
      rsp_ack <= 1'b0; rsrc <= R_REG; rreg <= '0;
      l1a_ovf_seen <= 1'b0;
    end else begin
      reconfig <= 1'b0;
      if (l1a_ovf) l1a_ovf_seen <= 1'b1;
      if (req.wr) begin
        unique case (req.addr)
          A_CTRL:      begin
                         sel_test  <= req.wdata[0];
                         xram_run  <= req.wdata[1];
                         cal_local <= req.wdata[2];
                         reconfig  <= req.wdata[8];
                         if (req.wdata[9]) l1a_ovf_seen <= 1'b0;
                       end
          A_MASK_LO:   mask[31:0] <= req.wdata;
          A_MASK_HI:   mask[N_WIRES-1:32] <= req.wdata[N_WIRES-33:0];
          A_PIPE_DLY:  pipe_dly  <= req.wdata[8:0];
          A_L2_LEN:    l2_len    <= req.wdata[6:0];
          A_XPIPE_DLY: xpipe_dly <= req.wdata[8:0];
          A_XL2_LEN:   xl2_len   <= req.wdata[6:0];
          A_XFT_START: xft_start <= req.wdata[3:0];
          A_XFT_WIDTH: xft_width <= req.wdata[23:0];
          A_CAL_DLY:   cal_dly   <= req.wdata[7:0];
          default: ;
        endcase
      end
      // read data source for the ack cycle
      rsrc <= R_REG;
      if (req.addr[15:6] == A_XDAQ_BASE[15:6]) rsrc <= R_XDAQ;
      else if (req.addr[15:9] == A_XRAM_BASE[15:9]) rsrc <= R_XRAM;
      unique case (req.addr)
        A_CTRL:      rreg <= {29'd0, cal_local, xram_run, sel_test};
        A_MASK_LO:   rreg <= mask[31:0];
        A_MASK_HI:   rreg <= 32'(mask[N_WIRES-1:32]);
        A_PIPE_DLY:  rreg <= 32'(pipe_dly);
        A_L2_LEN:    rreg <= 32'(l2_len);
        A_XPIPE_DLY: rreg <= 32'(xpipe_dly);
        A_XL2_LEN:   rreg <= 32'(xl2_len);
        A_XFT_START: rreg <= 32'(xft_start);
        A_XFT_WIDTH: rreg <= 32'(xft_width);
        A_CAL_DLY:   rreg <= 32'(cal_dly);
        A_STATUS:    rreg <= {6'd0, xram_nwords, 12'd0, l1a_ovf_seen, xdaq_ready, hd_empty, hc_empty};
        A_HITCOUNT:  rreg <= hc_rdata;
        A_HITDATA:   rreg <= hd_rdata;
        default:     rreg <= 32'd0;
      endcase
      rsp_ack <= req.rd || req.wr;
    end
  end

  always_comb begin
    unique case (rsrc)
      R_XDAQ:  rsp_rdata = 32'(xdaq_rdata);
      R_XRAM:  rsp_rdata = 32'(xram_rdata);
      default: rsp_rdata = rreg;
    endcase
  end
endmodule
