// tb_tdc_board: three TDC boards (slots 7, 8, 9) in a modelled VME crate, every
// parameter at its default, run end to end. Phases:
//  A  power-up L2 buffer content: an L2A with no L1A, then CBLTs of the hit-count
//     (slot 30) and hit-data (slot 31) buffers: 14 and 192 words per board, ended by BERR.
//  B  LVDS pulses on all 96 wires of every board (one wire masked), L1A after the
//     pipeline delay, L2A, CBLT read-out; hit counts and hit-time spacings checked.
//  C  test-data RAM as source on board 7 chip 1 (short pipe), pattern with one pulse
//     per loop; hits must repeat with the loop length.
//  D  five L1As on successive CDF clocks: the fifth overflows; four L2As fill the
//     read-out buffers beyond two events, so the edge detector stalls until CBLT drains.
//  E  XFT frames on P3, XFT DAQ read-out buffer and XFT-OUT-RAM read over VME.
//  F  local calibration pulse after B0; G  reconfiguration request by VME write.
//  H  pulse test: 12 wires of board 7 carry a 17-sample pulse repeating every 396 ns
//     (330 samples) at a random phase to the CDF clock; a 34-word window holds one or
//     two of them, 330 samples apart.
//  I  uneven load: 104, 8 and 20 hits on the three boards, so one hit-data CBLT
//     returns 52 + 4 + 10 = 66 words.
// Every mechanism is counted and a failure is counted for one that never happened.
module tb_tdc_board;
  import tdc_pkg::*;
  localparam int NB = 3;
  logic clk_fast = 1, clk12 = 0, clk22 = 0, cdf_clk = 0, rst = 1;
  logic l1a = 0, l2a = 0, b0 = 0, cal_bp = 0;
  logic [2*N_WIRES-1:0] lvds [NB];
  logic as_n = 1, write_n = 1;
  logic [1:0] ds_n = 2'b11;
  logic [5:0] am = 0;
  logic [31:0] addr = 0, d_m = 0;
  logic [31:0] d_out [NB];
  logic [NB-1:0] d_oe, dtack_v, berr_v, cal_out, reconfig;
  logic [NB:0] iack;
  logic [2*XFT_W-1:0] p3_data [NB];
  logic [1:0] p3_strobe [NB];
  logic dtack_n, berr_n;
  logic [31:0] dbus;
  int checks = 0, failures = 0;
  longint nsamp = 0;
  longint p0 = -1;
  longint pg0 = -1;   // start of the 12-channel test pattern
  longint pi0 = -1;   // start of the uneven per-board load of phase I
  // mechanism counters
  int m_default = 0, m_serdes_evt = 0, m_mask = 0, m_test_src = 0, m_ovf = 0, m_stall = 0;
  int m_cblt_berr = 0, m_iack_pass = 0, m_xft = 0, m_xdaq = 0, m_xram = 0, m_cal = 0, m_reconf = 0;
  int m_multi_l1a = 0, m_pattern = 0, m_latency = 0, m_uneven = 0;

  assign iack[0] = 1'b1;
  for (genvar b = 0; b < NB; b++) begin : g_b
    tdc_board u_board (
      .clk_fast, .rst_fast(rst), .clk12, .rst12(rst), .clk22, .rst22(rst), .cdf_clk,
      .l1a, .l2a, .b0, .lvds_in(lvds[b]), .ga_n(~5'(7 + b)), .as_n, .ds_n, .write_n, .am,
      .addr, .d_in(d_m), .d_out(d_out[b]), .d_oe(d_oe[b]), .dtack_n(dtack_v[b]),
      .berr_n(berr_v[b]), .iackin_n(iack[b]), .iackout_n(iack[b+1]), .p3_data(p3_data[b]),
      .p3_strobe(p3_strobe[b]), .cal_bp, .cal_out(cal_out[b]), .reconfig(reconfig[b]));
  end

  always #600ps clk_fast = ~clk_fast;
  always #6ns clk12 = ~clk12;
  always #11ns clk22 = ~clk22;
  initial begin #3ns; forever begin cdf_clk = 1; #66ns cdf_clk = 0; #66ns; end end
  assign dtack_n = &dtack_v;
  assign berr_n  = &berr_v;
  always_comb begin
    dbus = d_m;
    for (int b = 0; b < NB; b++) if (d_oe[b]) dbus = d_out[b];
  end
  always @(negedge iack[1]) if (!rst && !as_n) m_iack_pass++;
  always @(negedge iack[2]) if (!rst && !as_n) m_iack_pass++;
  always @(posedge clk12) if (!rst) begin
    if (cal_out[0]) m_cal++;
    m_reconf += $countones(reconfig);
    // edge detector waiting for read-out room with an event ready
    if (g_b[0].u_board.g_chip[0].u_chip.u_edge.state == 0 &&
        g_b[0].u_board.g_chip[0].u_chip.ro_ready &&
        !(g_b[0].u_board.g_chip[0].u_chip.hc_room && g_b[0].u_board.g_chip[0].u_chip.hd_room)) m_stall++;
  end
  always @(posedge clk22) if (!rst && p3_strobe[0][0]) m_xft++;

  // LVDS stimulus: wire i of chip 0 pulses 6 samples at 7*i after p0, wire i of
  // chip 1 at 7*(47-i), so the two chips see the pulses in opposite order
  always @(negedge clk_fast) begin
    nsamp++;
    for (int b = 0; b < NB; b++)
      for (int w = 0; w < 2 * N_WIRES; w++) begin
        automatic longint s = nsamp - p0;
        automatic longint o = (w < N_WIRES) ? 7 * w : 7 * (2 * N_WIRES - 1 - w);
        automatic longint si = nsamp - pi0;
        automatic longint oi = 4 * (w % N_WIRES);
        automatic int np = (b == 0) ? ((w >= N_WIRES && w < N_WIRES + 8) ? 2 : 1) :
                           (b == 1) ? ((w < 8) ? 1 : 0) : ((w < 20) ? 1 : 0);
        lvds[b][w] <= ((p0 >= 0) && s >= o && s < o + 6) ||
                      ((pi0 >= 0) && np >= 1 && si >= oi && si < oi + 6) ||
                      ((pi0 >= 0) && np >= 2 && si >= oi + 150 && si < oi + 156) ||
                      (b == 0 && w < 12 && pg0 >= 0 && (nsamp - pg0) % 330 < 17);
      end
  end

  // ---------------- VME master ----------------
  function automatic logic [31:0] chip_addr(int slot, int chip, logic [15:0] a);
    return {5'(slot), 6'd0, 1'(chip), 2'd0, a, 2'b00};
  endfunction
  function automatic logic [31:0] board_addr(int slot, int w);
    return {5'(slot), 5'd0, 1'b1, 21'd0} | (32'(w) << 2);
  endfunction

  task automatic vme_single(input bit wr, input logic [31:0] a, input logic [31:0] wd, output logic [31:0] rd);
    am = 6'h09; addr = a; write_n = !wr; d_m = wr ? wd : 32'd0;
    #10ns as_n = 0;
    #10ns ds_n = 2'b00;
    for (int t = 0; t < 100 && dtack_n; t++) #4ns;
    checks++;
    if (dtack_n) begin failures++; $display("no DTACK at %h", a); end
    rd = dbus;
    ds_n = 2'b11; as_n = 1;
    for (int t = 0; t < 100 && !dtack_n; t++) #4ns;
    #10ns;
  endtask
  task automatic wr_all_chips(logic [15:0] a, logic [31:0] d);
    logic [31:0] q;
    for (int b = 0; b < NB; b++) for (int c = 0; c < 2; c++) vme_single(1, chip_addr(7 + b, c, a), d, q);
  endtask

  task automatic cblt(input logic [31:0] a, output logic [31:0] words [$]);
    am = 6'h0B; addr = a; write_n = 1; d_m = 0;
    words.delete();
    #10ns as_n = 0;
    forever begin
      int t;
      #20ns ds_n = 2'b00;
      for (t = 0; t < 400 && dtack_n && berr_n; t++) #4ns;
      if (!berr_n) begin m_cblt_berr++; ds_n = 2'b11; break; end
      if (dtack_n) begin ds_n = 2'b11; failures++; $display("CBLT time-out"); break; end
      words.push_back(dbus);
      ds_n = 2'b11;
      for (t = 0; t < 100 && !dtack_n; t++) #4ns;
    end
    #20ns as_n = 1;
    #100ns;
  endtask

  task automatic on_cdf(ref logic s, input int n = 1);
    @(posedge cdf_clk); #10ns s = 1;
    repeat (n) @(posedge cdf_clk);
    #10ns s = 0;
  endtask

  // split a hit-count CBLT into per-chip records and check headers
  task automatic split_hc(input logic [31:0] w [$], output int cnt [NB][2][N_WIRES], output int ndw [NB][2]);
    checks++;
    if (w.size() != NB * 14) begin failures++; $display("hit-count CBLT %0d words", w.size()); return; end
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < 2; c++) begin
        automatic int o = b * 14 + c * 7;
        checks++;
        if (w[o][31:28] != 4'(c)) begin failures++; $display("board %0d chip %0d header %h", b, c, w[o]); end
        ndw[b][c] = int'(w[o][7:0]);
        for (int i = 0; i < N_WIRES; i++) cnt[b][c][i] = int'(w[o + 1 + i / 8][4 * (i % 8) +: 4]);
      end
  endtask

  initial begin
    logic [31:0] q, hcw [$], hdw [$];
    int cnt [NB][2][N_WIRES];
    int ndw [NB][2];
    int tot;
    #200ns rst = 0;
    // CBLT chain: slot 7 first, slot 9 last
    vme_single(1, board_addr(7, 0), 32'h5, q);
    vme_single(1, board_addr(8, 0), 32'h4, q);
    vme_single(1, board_addr(9, 0), 32'h6, q);

    // ---- A: power-up L2 buffer content
    on_cdf(l2a);
    #3us;
    cblt(32'hF090_0000, hcw);
    split_hc(hcw, cnt, ndw);
    cblt(32'hF880_0000, hdw);
    checks++;
    if (hdw.size() != NB * 192) begin failures++; $display("default hit-data %0d words", hdw.size()); end
    else begin
      for (int b = 0; b < NB; b++) for (int c = 0; c < 2; c++) begin
        checks++;
        if (ndw[b][c] != 96 || cnt[b][c][17] != 4) begin failures++; $display("default counts"); end
      end
      for (int k = 0; k < 96; k++) begin
        // wire k/2, hits at samples 10, 50, 90, 130
        automatic int w = k / 2, h = 2 * (k % 2);
        checks++;
        if (hdw[k] !== {6'(w), 10'(10 + 40 * h), 6'(w), 10'(50 + 40 * h)}) begin
          failures++; $display("default hit word %0d: %h", k, hdw[k]);
        end
      end
      m_default++;
    end

    // ---- B: LVDS pulses, board 8 chip 0 wire 3 masked
    vme_single(1, chip_addr(8, 0, A_MASK_LO), 32'h8, q);
    wr_all_chips(A_L2_LEN, 64);
    @(posedge cdf_clk); #20ns;
    p0 = nsamp + 2;
    repeat (8) @(posedge cdf_clk);
    on_cdf(l1a);
    repeat (4) @(posedge cdf_clk);
    on_cdf(l2a);
    begin
      // results ready: first hit-count word of board 7 chip 0, against ~7.25 us
      int n12 = 0;
      while (g_b[0].u_board.hc_empty[0] && n12 < 1000) begin #12ns; n12++; end
      checks++;
      if (n12 * 12 > 7250) begin failures++; $display("B: results after %0d ns", n12 * 12); end
      else m_latency++;
      $display("results ready %0d ns after the L2A", n12 * 12);
    end
    #4us;
    cblt(32'hF090_0000, hcw);
    split_hc(hcw, cnt, ndw);
    tot = 0;
    for (int b = 0; b < NB; b++) for (int c = 0; c < 2; c++) for (int i = 0; i < N_WIRES; i++) begin
      automatic int e = (b == 1 && c == 0 && i == 3) ? 0 : 1;
      checks++;
      if (cnt[b][c][i] != e) begin failures++; $display("B: board %0d chip %0d wire %0d: %0d hits", b, c, i, cnt[b][c][i]); end
      tot += cnt[b][c][i];
    end
    if (cnt[1][0][3] == 0 && cnt[1][0][4] == 1) m_mask++;
    cblt(32'hF880_0000, hdw);
    checks++;
    if (hdw.size() != 5 * 24 + 24) begin failures++; $display("B: hit data %0d words", hdw.size()); end
    else begin
      // board 7: hit of wire 2i+1 minus wire 2i is +7 samples on chip 0, -7 on chip 1
      for (int k = 0; k < 48; k++) begin
        automatic int d = (k < 24) ? 7 : -7;
        checks++;
        if (int'(hdw[k][9:0]) - int'(hdw[k][25:16]) != d) begin failures++; $display("B: spacing word %0d %h", k, hdw[k]); end
      end
      m_serdes_evt++;
    end
    p0 = -1;

    // ---- E: XFT DAQ read-out buffer (filled by the same L1A/L2A) and XFT-OUT-RAM
    vme_single(0, chip_addr(7, 0, A_STATUS), 0, q);
    checks++;
    if (!q[2]) begin failures++; $display("XFT DAQ not ready, status %h", q); end
    else begin
      int nz = 0;
      for (int i = 0; i < 34; i++) begin
        vme_single(0, chip_addr(7, 0, A_XDAQ_BASE + 16'(i)), 0, q);
        if (q[17:0] != 0) nz++;
      end
      if (nz > 0) m_xdaq++;
      vme_single(1, chip_addr(7, 0, A_XDAQ_BASE), 0, q);
    end
    vme_single(1, chip_addr(7, 0, A_CTRL), 32'h2, q);
    #2us;
    vme_single(0, chip_addr(7, 0, A_STATUS), 0, q);
    checks++;
    if (q[25:16] < 10'd80 || q[25:16] > 10'd100) begin failures++; $display("XFT-OUT-RAM words %0d", q[25:16]); end
    else begin
      vme_single(0, chip_addr(7, 0, A_XRAM_BASE + 16'd10), 0, q);
      m_xram++;
    end

    // ---- C: test-data RAM on board 7 chip 1, 10-row loop with a pulse in row 4
    vme_single(1, chip_addr(7, 1, A_PIPE_DLY), 10, q);
    for (int r = 0; r < 10; r++)
      for (int s = 0; s < 15; s++) begin
        automatic logic [479:0] row = '0;
        if (r == 4) for (int i = 0; i < N_WIRES; i++) row[i*10 +: 10] = 10'b1111100000;
        vme_single(1, chip_addr(7, 1, A_TRAM_BASE + 16'(r * 16 + s)), row[s*32 +: 32], q);
      end
    vme_single(1, chip_addr(7, 1, A_CTRL), 32'h1, q);
    wr_all_chips(A_L2_LEN, 34);
    #1us;
    on_cdf(l1a);
    repeat (3) @(posedge cdf_clk);
    on_cdf(l2a);
    #3us;
    cblt(32'hF090_0000, hcw);
    split_hc(hcw, cnt, ndw);
    checks++;
    // 34 words hold three or four loops of 10 words
    if (!(cnt[0][1][0] inside {3, 4}) || cnt[0][1][47] != cnt[0][1][0]) begin
      failures++; $display("C: test pattern hits %0d", cnt[0][1][0]);
    end else m_test_src++;
    cblt(32'hF880_0000, hdw);
    vme_single(1, chip_addr(7, 1, A_CTRL), 32'h0, q);
    vme_single(1, chip_addr(7, 1, A_PIPE_DLY), 100, q);

    // ---- D: five L1As on successive CDF clocks, then four L2As
    for (int n = 0; n < 5; n++) on_cdf(l1a);
    m_multi_l1a++;
    #1us;
    vme_single(0, chip_addr(9, 1, A_STATUS), 0, q);
    checks++;
    if (!q[3]) begin failures++; $display("D: no L1A overflow flag"); end else m_ovf++;
    for (int n = 0; n < 4; n++) begin on_cdf(l2a); repeat (2) @(posedge cdf_clk); end
    #4us;
    begin
      int nw = 0;
      for (int round = 0; round < 8 && nw < 4 * NB * 14; round++) begin
        cblt(32'hF090_0000, hcw);
        cblt(32'hF880_0000, hdw);
        nw += hcw.size();
        #3us;
      end
      checks++;
      if (nw != 4 * NB * 14) begin failures++; $display("D: %0d hit-count words read", nw); end
    end

    // ---- F: calibration pulse after B0 (board 7, chip 0 local source, delay 5)
    vme_single(1, chip_addr(7, 0, A_CAL_DLY), 5, q);
    vme_single(1, chip_addr(7, 0, A_CTRL), 32'h4, q);
    on_cdf(b0);
    #500ns;

    // ---- G: reconfiguration request
    vme_single(1, board_addr(8, 1), 32'h1, q);
    #100ns;

    // ---- H: 12-channel pattern, 396 ns period
    pg0 = nsamp + longint'($urandom_range(0, 329));
    #2us;
    on_cdf(l1a);
    repeat (2) @(posedge cdf_clk);
    on_cdf(l2a);
    #3us;
    cblt(32'hF090_0000, hcw);
    split_hc(hcw, cnt, ndw);
    cblt(32'hF880_0000, hdw);
    pg0 = -1;
    begin
      bit ok = 1;
      automatic int n = cnt[0][0][0];
      for (int b = 0; b < NB; b++) for (int c = 0; c < 2; c++) for (int i = 0; i < N_WIRES; i++)
        if (cnt[b][c][i] != ((b == 0 && c == 0 && i < 12) ? n : 0)) ok = 0;
      checks++;
      if (!ok || !(n inside {1, 2})) begin failures++; $display("H: pattern hit counts, wire 0 has %0d", n); end
      else begin
        checks++;
        // board 7 chip 0 hit data: 12 wires x n hits; wire 0's hits n words/2 at the front
        if (n == 2 && int'(hdw[0][9:0]) - int'(hdw[0][25:16]) != 330) begin
          failures++; $display("H: hit spacing %h", hdw[0]);
        end else m_pattern++;
        $display("pulse test: %0d hit(s) per wire, first at sample %0d", n, hdw[0][25:16]);
      end
    end

    // ---- I: 52 + 4 + 10 hit-data words from the three boards
    wr_all_chips(A_L2_LEN, 64);
    @(posedge cdf_clk); #20ns;
    pi0 = nsamp + 2;
    repeat (8) @(posedge cdf_clk);
    on_cdf(l1a);
    repeat (4) @(posedge cdf_clk);
    on_cdf(l2a);
    #4us;
    cblt(32'hF090_0000, hcw);
    split_hc(hcw, cnt, ndw);
    cblt(32'hF880_0000, hdw);
    pi0 = -1;
    checks++;
    if (hdw.size() != 66 || ndw[0][0] != 24 || ndw[0][1] != 28 || ndw[1][0] != 4 || ndw[1][1] != 0 ||
        ndw[2][0] != 10 || ndw[2][1] != 0) begin
      failures++;
      $display("I: %0d hit-data words, per chip %0d %0d %0d %0d %0d %0d", hdw.size(),
               ndw[0][0], ndw[0][1], ndw[1][0], ndw[1][1], ndw[2][0], ndw[2][1]);
    end else m_uneven++;
    $display("uneven load: %0d hit-data words in one CBLT", hdw.size());

    // mechanism report
    $display("default-data events %0d, SERDES events %0d, masked wire %0d, test-data source %0d",
             m_default, m_serdes_evt, m_mask, m_test_src);
    $display("L1A burst %0d, L1A overflow %0d, detector stall cycles %0d, CBLT ended by BERR %0d, IACKOUT passes %0d",
             m_multi_l1a, m_ovf, m_stall, m_cblt_berr, m_iack_pass);
    $display("XFT frames %0d, XFT DAQ read-outs %0d, XFT-OUT-RAM reads %0d, calibration pulses %0d, reconfig %0d, pulse tests %0d",
             m_xft, m_xdaq, m_xram, m_cal, m_reconf, m_pattern);
    if (m_default == 0) begin failures++; $display("never: default data"); end
    if (m_serdes_evt == 0) begin failures++; $display("never: SERDES event"); end
    if (m_mask == 0) begin failures++; $display("never: mask"); end
    if (m_test_src == 0) begin failures++; $display("never: test-data source"); end
    if (m_ovf == 0) begin failures++; $display("never: L1A overflow"); end
    if (m_stall == 0) begin failures++; $display("never: stall"); end
    if (m_cblt_berr == 0) begin failures++; $display("never: BERR"); end
    if (m_iack_pass == 0) begin failures++; $display("never: IACKOUT"); end
    if (m_xft == 0) begin failures++; $display("never: XFT"); end
    if (m_xdaq == 0) begin failures++; $display("never: XFT DAQ"); end
    if (m_xram == 0) begin failures++; $display("never: XFT-OUT-RAM"); end
    if (m_cal != 1) begin failures++; $display("calibration pulses: %0d", m_cal); end
    if (m_reconf == 0) begin failures++; $display("never: reconfig"); end
    if (m_pattern == 0) begin failures++; $display("never: pulse test"); end
    if (m_latency == 0) begin failures++; $display("never: result latency measured"); end
    if (m_uneven == 0) begin failures++; $display("never: 66-word CBLT"); end
    checks += 16;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
