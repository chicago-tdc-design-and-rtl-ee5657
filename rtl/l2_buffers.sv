// l2_buffers: the four Level-2 buffers and the read-out RAM that follows them.
//
// The pipeline output streams past all four buffers. A Level-1 accept (l1a) claims
// the next buffer in the order 00, 01, 10, 11, 00, ... and that buffer records the
// next len words of the stream (len <= 64, 768 ns at 12 ns). Because each buffer has
// its own write counter, several can fill at once, so L1A pulses one CDF clock
// (132 ns) apart are accepted, as the document requires. An L1A that finds its buffer
// still holding an event is dropped and flagged on l1a_overflow.
//
// A Level-2 accept (l2a) selects the oldest buffer holding an event (buffers are
// claimed and freed in the same circular order); with no event held it selects the
// buffer the next L1A would claim. When the read-out RAM is free and the selected
// buffer is not still filling, its len words
// are copied into the read-out RAM, one word per clock. The buffer is free for the
// next L1A from the clock the copy starts (so, as the document states, it can be
// written again on the next CDF clock after the L2A); ro_ready rises when the copy ends; the consumer (the edge detector or VME) reads the
// RAM at ro_raddr (one rclk cycle latency) and pulses ro_release when done. The read
// port has its own clock rclk, tied to clk when reader and writer share a clock. L2A pulses
// that arrive while a copy waits are counted and served in order.
//
// The buffers are not loadable from VME but start with a known content so that the
// read-out chain can be tested with L2A alone. That content is this design's choice:
// in every buffer, words 1, 5, 9 and 13 hold the 10-bit pattern 1111000000 repeated
// across the word, all other words are 0 (for the 480-bit data: one hit on every
// wire in each of those words). The circular order, the overflow rule and the
// one-word-per-clock copy are also choices of this design. A buffer is free again on
// the next CDF clock after its L2A only when the read-out RAM is free at that time;
// otherwise the copy, and with it the release, waits for the edge detector.
module l2_buffers #(
  parameter int W     = 480,
  parameter int NBUF  = 4,
  parameter int DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(DEPTH):0]   len,
  input  logic [W-1:0]             din,
  input  logic                     l1a,
  input  logic                     l2a,
  output logic                     l1a_overflow,
  output logic                     ro_ready,
  input  logic [$clog2(DEPTH)-1:0] ro_raddr,
  output logic [W-1:0]             ro_rdata,
  input  logic                     ro_release,
  input  logic                     rclk,
  output logic [NBUF-1:0]          buf_busy
);
  localparam int AW = $clog2(DEPTH);
  localparam int BW = (NBUF > 1) ? $clog2(NBUF) : 1;

  typedef enum logic [1:0] {B_FREE, B_FILL, B_FULL} bstate_e;

  bstate_e          st   [NBUF];
  logic [AW:0]      wcnt [NBUF];
  logic [BW-1:0]    wsel, rsel;
  logic [3:0]       l2a_pend;
  logic             copying, cp_wr;
  logic [AW:0]      cp_cnt;
  logic [AW-1:0]    cp_waddr;
  logic [W-1:0]     cp_data;
  logic [W-1:0]     bmem [NBUF][DEPTH];
  logic [W-1:0]     romem [DEPTH];

  function automatic logic [W-1:0] default_word(int w);
    logic [W-1:0] r = '0;
    if (w % 4 == 1 && w < 16)
      for (int k = 0; k < W; k++) r[k] = ((k % 10) >= 6);
    return r;
  endfunction

  initial begin
    for (int b = 0; b < NBUF; b++)
      for (int w = 0; w < DEPTH; w++) bmem[b][w] = default_word(w);
  end

  // buffer writes: every filling buffer stores the current stream word
  for (genvar b = 0; b < NBUF; b++) begin : g_buf
    always_ff @(posedge clk)
      if (st[b] == B_FILL) bmem[b][wcnt[b][AW-1:0]] <= din;
  end

  // buffers are claimed and freed in the same circular order, so the busy ones are
  // the npend buffers just before wsel; the oldest of them is served first
  logic          start_copy;
  logic [BW:0]   npend;
  logic [BW-1:0] sel_next;
  always_comb begin
    npend = '0;
    for (int b = 0; b < NBUF; b++) npend = npend + (BW+1)'(st[b] != B_FREE);
    sel_next = wsel - BW'(npend);
  end
  assign start_copy = !copying && !ro_ready && !l1a && (l2a_pend != 0) && (st[sel_next] != B_FILL);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int b = 0; b < NBUF; b++) begin
        st[b]   <= B_FREE;
        wcnt[b] <= '0;
      end
      wsel <= '0; rsel <= '0; l2a_pend <= '0;
      copying <= 1'b0; cp_cnt <= '0; cp_wr <= 1'b0; cp_waddr <= '0;
      ro_ready <= 1'b0; l1a_overflow <= 1'b0;
    end else begin
      l1a_overflow <= 1'b0;
      for (int b = 0; b < NBUF; b++)
        if (st[b] == B_FILL) begin
          wcnt[b] <= wcnt[b] + 1'b1;
          if (wcnt[b] + 1'b1 >= len) st[b] <= B_FULL;
        end
      if (l1a) begin
        if (st[wsel] == B_FREE) begin
          st[wsel]   <= B_FILL;
          wcnt[wsel] <= '0;
          wsel       <= wsel + 1'b1;
        end else begin
          l1a_overflow <= 1'b1;
        end
      end
      // copy engine: read address cp_cnt, write one cycle later
      cp_wr    <= copying && (cp_cnt < len);
      cp_waddr <= cp_cnt[AW-1:0];
      // the served buffer is free as soon as its copy starts: the copy reads word i
      // at least two clocks before a new fill can write it, and both advance one
      // word per clock, so a following L1A may already claim it
      if (start_copy) begin
        rsel         <= sel_next;
        copying      <= 1'b1;
        cp_cnt       <= '0;
        st[sel_next] <= B_FREE;
      end else if (copying) begin
        if (cp_cnt >= len) begin
          copying  <= 1'b0;
          ro_ready <= 1'b1;
        end
        cp_cnt <= cp_cnt + 1'b1;
      end
      l2a_pend <= l2a_pend + {3'b0, l2a} - {3'b0, start_copy};
      if (ro_release) ro_ready <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    cp_data <= bmem[rsel][cp_cnt[AW-1:0]];
    if (cp_wr) romem[cp_waddr] <= cp_data;
  end

  // read port of the read-out RAM, on its own clock (the reader's domain)
  always_ff @(posedge rclk) ro_rdata <= romem[ro_raddr];

  always_comb
    for (int b = 0; b < NBUF; b++) buf_busy[b] = (st[b] != B_FREE);
endmodule
