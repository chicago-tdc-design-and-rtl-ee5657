// vme_chip: the VME interface FPGA of the TDC board, with chained block transfer.
//
// Single cycles (address modifier 0x09, A32 data): the board answers when A[31:27]
// equals its slot number, taken from the geographic address lines. A[21] = 1 selects
// the VME chip's own registers (word 0: CBLT control {cblt_en, last, first};
// word 1: a write asks both TDC chips to reconfigure). A[21] = 0 reaches TDC chip
// A[20] over its local bus at word address A[17:2]. The slave answers with DTACK and,
// for a read, drives D until the data strobes are released.
//
// CBLT (chained block transfer, ANSI/VITA 23, address modifier 0x0B): the document
// sets A[31:24] = YY with slot 30 for the hit-count buffers (YY900000, 14 words per
// board) and slot 31 for the hit-data buffers (YY800000, up to 192 words per board);
// the F0900000 and F8800000 of the simulated transfer decode to slots 30 and 31 in
// A[31:27]. All enabled boards take part. A board owns the transfer while its IACKIN*
// is low, or from the start if it is marked first. Each data strobe it then answers
// with the next word of chip 0's buffer, and when that is empty of chip 1's. When both
// are empty it either passes the transfer on by pulling IACKOUT* low, or, if marked
// last, ends it with BERR*. It releases everything when AS* goes high.
//
// The slot decode, the register map, the local bus and the first/last marking are
// this design's choices: the document names first, last and cblt_en as signals of its
// VME interface but does not define them. Outside CBLT, IACKIN* is passed straight
// on to IACKOUT*. VME strobes are brought into the clk domain by two flip-flops; the
// address, address modifier, WRITE* and data are taken when a data strobe is seen
// (VME holds them valid before the strobes).
// Open-collector outputs are given as levels with 1 = released.
module vme_chip
  import tdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  ga_n,       // geographic address (slot) pins, active low
  input  logic        as_n,
  input  logic [1:0]  ds_n,
  input  logic        write_n,
  input  logic [5:0]  am,
  input  logic [31:0] addr,
  input  logic [31:0] d_in,
  output logic [31:0] d_out,
  output logic        d_oe,
  output logic        dtack_n,
  output logic        berr_n,
  input  logic        iackin_n,
  output logic        iackout_n,
  output lbus_req_t   lreq [2],
  input  lbus_rsp_t   lrsp [2],
  input  logic [1:0]  hc_empty,
  input  logic [1:0]  hd_empty,
  output logic        reconfig
);
  localparam logic [5:0] AM_A32_DATA = 6'h09;
  localparam logic [5:0] AM_A32_BLT  = 6'h0B;
  localparam logic [4:0] SLOT_HC     = 5'd30;
  localparam logic [4:0] SLOT_HD     = 5'd31;

  typedef enum logic [3:0] {
    V_IDLE, V_LWAIT, V_ACK, V_SKIP,
    C_WAIT_DS, C_LWAIT, C_DTACK, C_BERR, C_PASS
  } vstate_e;

  vstate_e     st;
  logic [1:0]  as_s, iack_s;
  logic [1:0]  ds0_s, ds1_s;
  logic        as_l, ds_l, iackin_l;
  logic [4:0]  slot;
  logic        chip_l;     // TDC chip of a single cycle
  logic        wr_l;
  logic        first, last, cblt_en;
  logic        src_hd;     // CBLT source: 0 hit count, 1 hit data
  logic        ci;         // chip being read
  logic        cdone;      // both chips empty
  logic        passed;
  logic [31:0] rdat;
  logic        token, cur_empty;

  assign slot     = ~ga_n;
  assign as_l     = !as_s[1];
  assign ds_l     = !ds0_s[1] || !ds1_s[1];
  assign iackin_l = !iack_s[1];
  assign token    = first || iackin_l;
  assign cur_empty = src_hd ? hd_empty[ci] : hc_empty[ci];

  always_ff @(posedge clk) begin
    if (rst) begin
      as_s <= '1; ds0_s <= '1; ds1_s <= '1; iack_s <= '1;
    end else begin
      as_s   <= {as_s[0], as_n};
      ds0_s  <= {ds0_s[0], ds_n[0]};
      ds1_s  <= {ds1_s[0], ds_n[1]};
      iack_s <= {iack_s[0], iackin_n};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= V_IDLE;
      chip_l <= 1'b0; wr_l <= 1'b0;
      first <= 1'b0; last <= 1'b0; cblt_en <= 1'b0;
      src_hd <= 1'b0; ci <= 1'b0; cdone <= 1'b0; passed <= 1'b0;
      rdat <= '0; reconfig <= 1'b0;
      for (int c = 0; c < 2; c++) lreq[c] <= '0;
    end else begin
      reconfig <= 1'b0;
      for (int c = 0; c < 2; c++) begin
        lreq[c].rd <= 1'b0;
        lreq[c].wr <= 1'b0;
      end
      unique case (st)
        V_IDLE: begin
          passed <= 1'b0;
          if (as_l && ds_l) begin
            chip_l <= addr[20];
            wr_l <= !write_n;
            if (am == AM_A32_DATA && addr[31:27] == slot) begin
              if (addr[21]) begin
                // VME chip registers
                if (!write_n && addr[5:2] == 4'd0) {cblt_en, last, first} <= d_in[2:0];
                if (!write_n && addr[5:2] == 4'd1) reconfig <= 1'b1;
                rdat <= (addr[5:2] == 4'd0) ? {29'd0, cblt_en, last, first} : 32'd0;
                st <= V_ACK;
              end else begin
                lreq[addr[20]].rd    <= write_n;
                lreq[addr[20]].wr    <= !write_n;
                lreq[addr[20]].addr  <= addr[17:2];
                lreq[addr[20]].wdata <= d_in;
                st <= V_LWAIT;
              end
            end else if (am == AM_A32_BLT && cblt_en &&
                         (addr[31:27] == SLOT_HC || addr[31:27] == SLOT_HD)) begin
              src_hd <= (addr[31:27] == SLOT_HD);
              ci     <= 1'b0;
              cdone  <= 1'b0;
              st     <= C_WAIT_DS;
            end else begin
              st <= V_SKIP;
            end
          end
        end
        V_LWAIT: begin
          if (lrsp[chip_l].ack) begin
            rdat <= lrsp[chip_l].rdata;
            st   <= V_ACK;
          end
        end
        V_ACK: if (!ds_l) st <= V_IDLE;
        V_SKIP: if (!as_l) st <= V_IDLE;
        C_WAIT_DS: begin
          if (!as_l) st <= V_IDLE;
          else if (ds_l && token) begin
            if (!cdone && !cur_empty) begin
              lreq[ci].rd   <= 1'b1;
              lreq[ci].addr <= src_hd ? A_HITDATA : A_HITCOUNT;
              st <= C_LWAIT;
            end else if (!cdone) begin
              if (ci) cdone <= 1'b1;
              ci <= 1'b1;
            end else if (last) begin
              st <= C_BERR;
            end else begin
              passed <= 1'b1;
              st <= C_PASS;
            end
          end
        end
        C_LWAIT: begin
          if (lrsp[ci].ack) begin
            rdat <= lrsp[ci].rdata;
            st   <= C_DTACK;
          end
        end
        C_DTACK: if (!ds_l) st <= C_WAIT_DS;
        C_BERR:  if (!as_l) st <= V_IDLE;
        C_PASS:  if (!as_l) st <= V_IDLE;
        default: st <= V_IDLE;
      endcase
    end
  end

  always_comb begin
    dtack_n   = !(st == V_ACK || st == C_DTACK);
    berr_n    = !(st == C_BERR && ds_l);
    d_oe      = (st == V_ACK && !wr_l) || st == C_DTACK;
    d_out     = rdat;
    iackout_n = passed ? 1'b0 : (st == V_IDLE || st == V_SKIP || st == V_LWAIT || st == V_ACK) ? iackin_n : 1'b1;
  end

  // DTACK* and BERR* never both asserted
  a_dtack_berr: assert property (@(posedge clk) disable iff (rst) !(!dtack_n && !berr_n));
endmodule
