// edge_detector: finds the hits in an accepted event and builds its read-out words.
//
// Hit rule (from the document): a hit is at least four 1 samples followed by at least
// four 0 samples on a wire; at most four hits are recorded per wire. The detector
// reads the len words of the read-out RAM in order, one 480-bit word per clock, and
// walks the ten samples of each wire (bit 9 is the oldest) through a small per-wire
// state: length of the current run of ones (saturating at 4), length of the run of
// zeros after it, and the sample index where the run of ones began. When the fourth
// zero follows at least four ones, the start index is recorded as the hit time, in
// 1.2 ns units from the start of the L2 window (0..639).
//
// After the scan it releases the read-out RAM and writes two records:
//   hit count: 1 header + 6 words, 4 bits per wire (wire 8k+j in bits [4j+3:4j] of
//              word k), 7 VME words per chip as in the document;
//   hit data : 16 bits per hit, two hits per 32-bit word (first in bits 31:16), wires
//              in ascending order, at most 4 x 48 / 2 = 96 words; an odd last half is
//              filled with 16'hFFFF.
// Header: [31:28] chip_id, [27:16] event number, [15:8] zero, [7:0] number of
// hit-data words. A hit is {wire[5:0], time[9:0]}. These formats are this design's
// choices; the document gives only the sizes.
//
// Flow control: an event starts only when the read-out buffers have room for a
// largest event (hc_room and hd_room), otherwise the detector stalls.
// Timing: len + about 8 cycles for the scan, then 7 hit-count writes, then one
// cycle per hit plus one per wire for the hit data.
module edge_detector #(
  parameter int N     = 48,
  parameter int SER   = 10,
  parameter int DEPTH = 64,
  parameter int MAXH  = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [3:0]               chip_id,
  input  logic [$clog2(DEPTH):0]   len,
  input  logic                     ro_ready,
  output logic [$clog2(DEPTH)-1:0] ro_raddr,
  input  logic [N*SER-1:0]         ro_rdata,
  output logic                     ro_release,
  input  logic                     hc_room,
  input  logic                     hd_room,
  output logic                     hc_wr,
  output logic [31:0]              hc_data,
  output logic                     hd_wr,
  output logic [31:0]              hd_data,
  output logic                     busy
);
  localparam int AW  = $clog2(DEPTH);
  localparam int TW  = 10;                  // hit time width, 1.2 ns units
  localparam int NHC = (N * 4 + 31) / 32;   // hit-count words after the header

  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_SUM, S_HC, S_HD, S_FLUSH} state_e;

  typedef struct packed {
    logic [2:0]  ones;
    logic [2:0]  zeros;
    logic [TW-1:0] start;
    logic [2:0]  nh;
  } wire_st_t;

  state_e        state;
  wire_st_t      ws   [N];
  wire_st_t      ws_n [N];
  logic [TW-1:0] hits   [N][MAXH];
  logic [TW-1:0] hits_n [N][MAXH];
  logic [AW:0]   rcnt;          // words requested
  logic [AW:0]   pcnt;          // words processed
  logic          rvalid;
  logic [11:0]   evnum;
  logic [7:0]    ndw;
  logic [3:0]    hcw;
  logic [5:0]    wsel;
  logic [2:0]    hsel;
  logic          pend_v;
  logic [15:0]   pend;

  assign busy     = (state != S_IDLE);
  assign ro_raddr = rcnt[AW-1:0];

  // per-wire sample walk for the word arriving this cycle
  always_comb begin
    for (int i = 0; i < N; i++) begin
      automatic wire_st_t s = ws[i];
      for (int h = 0; h < MAXH; h++) hits_n[i][h] = hits[i][h];
      for (int k = SER - 1; k >= 0; k--) begin
        automatic logic [TW-1:0] t = TW'(pcnt * SER + (SER - 1 - k));
        if (ro_rdata[i*SER + k]) begin
          if (s.zeros != 0 || s.ones == 0) begin
            s.ones  = 3'd1;
            s.start = t;
          end else if (s.ones < 3'd4) begin
            s.ones = s.ones + 3'd1;
          end
          s.zeros = 3'd0;
        end else if (s.ones != 0) begin
          s.zeros = s.zeros + 3'd1;
          if (s.zeros == 3'd4) begin
            if (s.ones == 3'd4 && s.nh < 3'(MAXH)) begin
              hits_n[i][s.nh[1:0]] = s.start;
              s.nh = s.nh + 3'd1;
            end
            s.ones  = 3'd0;
            s.zeros = 3'd0;
          end
        end
      end
      ws_n[i] = s;
    end
  end

  logic [8:0] hsum;
  always_comb begin
    hsum = '0;
    for (int i = 0; i < N; i++) hsum = hsum + 9'(ws[i].nh);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      rcnt <= '0; pcnt <= '0; rvalid <= 1'b0;
      evnum <= '0; ndw <= '0; hcw <= '0; wsel <= '0; hsel <= '0;
      pend_v <= 1'b0; pend <= '0;
      ro_release <= 1'b0; hc_wr <= 1'b0; hd_wr <= 1'b0;
      hc_data <= '0; hd_data <= '0;
      for (int i = 0; i < N; i++) begin
        ws[i] <= '0;
        for (int h = 0; h < MAXH; h++) hits[i][h] <= '0;
      end
    end else begin
      ro_release <= 1'b0;
      hc_wr <= 1'b0;
      hd_wr <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (ro_ready && hc_room && hd_room) begin
            state <= S_SCAN;
            rcnt <= '0; pcnt <= '0; rvalid <= 1'b0;
            for (int i = 0; i < N; i++) ws[i] <= '0;
          end
        end
        S_SCAN: begin
          // request word rcnt, its data is valid one cycle later
          if (rcnt < len) rcnt <= rcnt + 1'b1;
          rvalid <= (rcnt < len);
          if (rvalid) begin
            for (int i = 0; i < N; i++) begin
              ws[i] <= ws_n[i];
              for (int h = 0; h < MAXH; h++) hits[i][h] <= hits_n[i][h];
            end
            pcnt <= pcnt + 1'b1;
            if (pcnt + 1'b1 >= len) begin
              state <= S_SUM;
              ro_release <= 1'b1;
            end
          end
        end
        S_SUM: begin
          ndw   <= 8'((hsum + 9'd1) >> 1);
          hcw   <= '0;
          state <= S_HC;
        end
        S_HC: begin
          hc_wr <= 1'b1;
          if (hcw == 0) begin
            hc_data <= {chip_id, evnum, 8'h00, ndw};
          end else begin
            for (int j = 0; j < 8; j++) begin
              automatic int wi = (int'(hcw) - 1) * 8 + j;
              hc_data[4*j +: 4] <= (wi < N) ? {1'b0, ws[wi].nh} : 4'h0;
            end
          end
          if (hcw == 4'(NHC)) begin
            state <= S_HD;
            wsel <= '0; hsel <= '0; pend_v <= 1'b0;
          end
          hcw <= hcw + 1'b1;
        end
        S_HD: begin
          if (wsel == 6'(N)) begin
            state <= S_FLUSH;
          end else if (hsel < ws[wsel].nh) begin
            if (pend_v) begin
              hd_wr   <= 1'b1;
              hd_data <= {pend, wsel, hits[wsel][hsel[1:0]]};
              pend_v  <= 1'b0;
            end else begin
              pend   <= {wsel, hits[wsel][hsel[1:0]]};
              pend_v <= 1'b1;
            end
            hsel <= hsel + 1'b1;
          end else begin
            wsel <= wsel + 1'b1;
            hsel <= '0;
          end
        end
        S_FLUSH: begin
          if (pend_v) begin
            hd_wr   <= 1'b1;
            hd_data <= {pend, 16'hFFFF};
          end
          evnum <= evnum + 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
