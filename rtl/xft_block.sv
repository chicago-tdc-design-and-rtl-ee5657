// xft_block: XFT flags for the track trigger, new-style windows, sent to P3.
//
// The CDF period (132 ns) is cut into six continuous, non-overlapping time windows
// whose start and widths are programmable in 12 ns units, as the document describes.
// Window 0 begins `start` cycles after the CDF tick; window k lasts width[k] cycles
// and window k+1 begins where it ends. A wire has a hit in a 12 ns cycle when four
// successive samples (4.8 ns) are high, counting the last three samples of the
// previous word; its flag for a window is set if it had a hit in any cycle of it.
//
// At the next CDF tick the 6 x XW flags of the finished period are latched. The 22 ns
// side detects the same CDF edge two to three 22 ns cycles later, when the latched
// flags are stable (both clocks are locked to the CDF clock), copies them, and sends
// them at its following tick, that is
// from the second CDF clock after the crossing, as the document states: six 18-bit
// words, one per 22 ns cycle, word k holding window k of wires FIRST..FIRST+17, with
// p3_strobe high during word 0. The same words go to the XFT DAQ and XFT-OUT-RAM.
//
// The document gives the six windows, the 4-sample rule, the 18-bit + strobe output,
// the 22 ns clock and the start on the second CDF clock. Which wires feed the 18 bits,
// the word order and the strobe meaning are this design's choices. The old-style mode
// (PROMPT, NOTSURE, LATE windows) is not built: its truth table is not given.
module xft_block #(
  parameter int N     = 48,
  parameter int SER   = 10,
  parameter int XW    = 18,   // flags per output word
  parameter int FIRST = 0,    // first wire feeding the XFT
  parameter int NWIN  = 6
) (
  input  logic               clk12,
  input  logic               rst12,
  input  logic               tick12,
  input  logic [N*SER-1:0]   din,
  input  logic [3:0]         start,
  input  logic [NWIN*4-1:0]  width,   // width of window k in bits [4k+3:4k]
  input  logic               clk22,
  input  logic               rst22,
  input  logic               tick22,
  output logic [XW-1:0]      p3_data,
  output logic               p3_strobe
);
  logic [5:0]         cyc, cyc_now;
  logic [2:0]         prev [XW];
  logic [XW-1:0]      hit;
  logic [XW-1:0]      acc   [NWIN];
  logic [XW-1:0]      frame [NWIN];
  logic [NWIN-1:0]    in_win;
  logic [XW-1:0]      shadow [NWIN];
  logic [XW-1:0]      sendb  [NWIN];
  logic [2:0]         wcnt;

  assign cyc_now = tick12 ? 6'd0 : cyc + 6'd1;

  // which window the current cycle belongs to
  always_comb begin
    automatic logic [6:0] b = 7'(start);
    for (int k = 0; k < NWIN; k++) begin
      in_win[k] = ({1'b0, cyc_now} >= b) && ({1'b0, cyc_now} < b + 7'(width[4*k +: 4]));
      b = b + 7'(width[4*k +: 4]);
    end
  end

  // four successive high samples within {last three samples, this word}
  always_comb begin
    for (int i = 0; i < XW; i++) begin
      automatic logic [SER+2:0] s = {prev[i], din[(FIRST+i)*SER +: SER]};
      hit[i] = 1'b0;
      for (int k = 0; k + 3 <= SER + 2; k++) hit[i] |= &s[k +: 4];
    end
  end

  always_ff @(posedge clk12) begin
    if (rst12) begin
      cyc <= '0;
      for (int i = 0; i < XW; i++) prev[i] <= '0;
      for (int k = 0; k < NWIN; k++) begin acc[k] <= '0; frame[k] <= '0; end
    end else begin
      cyc <= (cyc == 6'd63 && !tick12) ? cyc : cyc_now;
      for (int i = 0; i < XW; i++) prev[i] <= din[(FIRST+i)*SER +: 3];
      for (int k = 0; k < NWIN; k++) begin
        if (tick12) begin
          frame[k] <= acc[k];
          acc[k]   <= in_win[k] ? hit : '0;
        end else if (in_win[k]) begin
          acc[k] <= acc[k] | hit;
        end
      end
    end
  end

  // 22 ns side: on each tick take the frame latched at the same CDF clock, and send
  // the one taken at the previous tick, so a period goes out on the second CDF clock
  always_ff @(posedge clk22) begin
    if (rst22) begin
      for (int k = 0; k < NWIN; k++) begin shadow[k] <= '0; sendb[k] <= '0; end
      wcnt <= 3'(NWIN);
      p3_data <= '0;
      p3_strobe <= 1'b0;
    end else begin
      p3_strobe <= 1'b0;
      if (tick22) begin
        for (int k = 0; k < NWIN; k++) begin
          shadow[k] <= frame[k];
          sendb[k]  <= shadow[k];
        end
        p3_data   <= shadow[0];
        p3_strobe <= 1'b1;
        wcnt      <= 3'd1;
      end else if (wcnt < 3'(NWIN)) begin
        p3_data <= sendb[wcnt];
        wcnt    <= wcnt + 1'b1;
      end
    end
  end
endmodule
