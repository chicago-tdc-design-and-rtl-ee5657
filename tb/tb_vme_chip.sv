// tb_vme_chip: three VME chips in slots 7, 8 and 9 on one modelled VME bus, each with
// two mock TDC chips (local-bus responders holding hit-count and hit-data words),
// chained IACKIN*/IACKOUT* as in a crate. Checks: single-cycle writes and reads of a
// chip register and of the CBLT control register reach only the addressed board;
// a CBLT of the hit-count buffers (slot 30) returns all words of board 7, chip 0 then
// chip 1, then board 8, then board 9, and ends with BERR*; the same for hit data
// (slot 31) with unequal word counts, including a board with nothing to send; each
// board drops IACKOUT* only after its own words; a board left out of the chain
// (cblt_en off) is skipped.
module tb_vme_chip;
  import tdc_pkg::*;
  localparam int NB = 3;
  logic clk = 0, rst = 1;
  logic as_n = 1, write_n = 1;
  logic [1:0] ds_n = 2'b11;
  logic [5:0] am = 0;
  logic [31:0] addr = 0, d_m = 0;
  logic [31:0] d_out [NB];
  logic [NB-1:0] d_oe, dtack_v, berr_v, iackout_v, reconfig;
  logic [NB:0] iack_chain;
  lbus_req_t lreq [NB][2];
  lbus_rsp_t lrsp [NB][2];
  logic [1:0] hc_empty [NB], hd_empty [NB];
  logic dtack_n, berr_n;
  logic [31:0] dbus;
  logic [31:0] hcq [NB][2][$], hdq [NB][2][$];
  logic [31:0] regs [NB][2][16];
  int checks = 0, failures = 0;
  int iack_fall [NB];
  int n_berr = 0;

  assign iack_chain[0] = 1'b1;
  for (genvar b = 0; b < NB; b++) begin : g_b
    vme_chip u (.clk, .rst, .ga_n(~5'(7 + b)), .as_n, .ds_n, .write_n, .am, .addr, .d_in(d_m),
      .d_out(d_out[b]), .d_oe(d_oe[b]), .dtack_n(dtack_v[b]), .berr_n(berr_v[b]),
      .iackin_n(iack_chain[b]), .iackout_n(iack_chain[b+1]), .lreq(lreq[b]), .lrsp(lrsp[b]),
      .hc_empty(hc_empty[b]), .hd_empty(hd_empty[b]), .reconfig(reconfig[b]));
    for (genvar c = 0; c < 2; c++) begin : g_c
      always_comb begin
        hc_empty[b][c] = (hcq[b][c].size() == 0);
        hd_empty[b][c] = (hdq[b][c].size() == 0);
      end
      always @(posedge clk) begin
        lrsp[b][c].ack <= lreq[b][c].rd || lreq[b][c].wr;
        if (lreq[b][c].wr) regs[b][c][lreq[b][c].addr[3:0]] <= lreq[b][c].wdata;
        if (lreq[b][c].rd) begin
          if (lreq[b][c].addr == A_HITCOUNT) lrsp[b][c].rdata <= hcq[b][c].pop_front();
          else if (lreq[b][c].addr == A_HITDATA) lrsp[b][c].rdata <= hdq[b][c].pop_front();
          else lrsp[b][c].rdata <= regs[b][c][lreq[b][c].addr[3:0]];
        end
      end
    end
    always @(negedge iack_chain[b+1]) if (!rst && !as_n) iack_fall[b] = $time / 1ns;
  end

  always #6ns clk = ~clk;
  assign dtack_n = &dtack_v;
  assign berr_n  = &berr_v;
  always_comb begin
    dbus = d_m;
    for (int b = 0; b < NB; b++) if (d_oe[b]) dbus = d_out[b];
  end

  task automatic vme_single(input bit wr, input logic [31:0] a, input logic [31:0] wd,
                            output logic [31:0] rd, output bit ok);
    am = 6'h09; addr = a; write_n = !wr; d_m = wr ? wd : 32'd0;
    #20ns as_n = 0;
    #10ns ds_n = 2'b00;
    ok = 0;
    for (int t = 0; t < 200 && dtack_n && berr_n; t++) #5ns;
    ok = !dtack_n;
    rd = dbus;
    #5ns ds_n = 2'b11; as_n = 1;
    for (int t = 0; t < 200 && !dtack_n; t++) #5ns;
    #40ns;
  endtask

  task automatic cblt(input logic [31:0] a, output logic [31:0] words [$], output bit ended_berr);
    am = 6'h0B; addr = a; write_n = 1; d_m = 0;
    words.delete(); ended_berr = 0;
    for (int b = 0; b < NB; b++) iack_fall[b] = -1;
    #20ns as_n = 0;
    forever begin
      int t;
      #30ns ds_n = 2'b00;
      for (t = 0; t < 400 && dtack_n && berr_n; t++) #5ns;
      if (!berr_n) begin ended_berr = 1; n_berr++; ds_n = 2'b11; break; end
      if (dtack_n) begin ds_n = 2'b11; break; end   // no answer: time-out
      #5ns words.push_back(dbus);
      ds_n = 2'b11;
      for (t = 0; t < 200 && !dtack_n; t++) #5ns;
    end
    #20ns as_n = 1;
    #200ns;
  endtask

  task automatic load(int nhc [NB][2], int nhd [NB][2], output logic [31:0] exp_hc [$], output logic [31:0] exp_hd [$]);
    exp_hc.delete(); exp_hd.delete();
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < 2; c++) begin
        hcq[b][c].delete(); hdq[b][c].delete();
        for (int k = 0; k < nhc[b][c]; k++) begin
          automatic logic [31:0] v = {8'hC0 + 8'(b), 8'(c), 16'(k)};
          hcq[b][c].push_back(v); exp_hc.push_back(v);
        end
        for (int k = 0; k < nhd[b][c]; k++) begin
          automatic logic [31:0] v = $urandom;
          hdq[b][c].push_back(v); exp_hd.push_back(v);
        end
      end
  endtask

  task automatic compare(string what, logic [31:0] got [$], logic [31:0] exp [$]);
    checks++;
    if (got.size() != exp.size()) begin
      failures++; $display("%s: %0d words, exp %0d", what, got.size(), exp.size());
    end else foreach (exp[i]) begin
      checks++;
      if (got[i] !== exp[i]) begin failures++; $display("%s word %0d: %h exp %h", what, i, got[i], exp[i]); end
    end
  endtask

  initial begin
    logic [31:0] rdv, words [$], exp_hc [$], exp_hd [$];
    bit ok, eb;
    int nhc [NB][2], nhd [NB][2];
    repeat (3) @(negedge clk); rst = 0;
    // single cycles: a chip register of board 8, chip 1, word 5
    vme_single(1, {5'd8, 6'd0, 1'b0, 1'b1, 1'b0, 16'd5, 2'b00}, 32'h5555_AAAA, rdv, ok);
    checks++; if (!ok) begin failures++; $display("single write not acknowledged"); end
    vme_single(0, {5'd8, 6'd0, 1'b0, 1'b1, 1'b0, 16'd5, 2'b00}, 0, rdv, ok);
    checks++; if (!ok || rdv !== 32'h5555_AAAA) begin failures++; $display("single read %h", rdv); end
    vme_single(0, {5'd12, 27'd0}, 0, rdv, ok);
    checks++; if (ok) begin failures++; $display("empty slot answered"); end
    // CBLT set-up: board 7 first, board 9 last, all enabled
    vme_single(1, {5'd7, 5'd0, 1'b1, 21'd0}, 32'h5, rdv, ok);
    vme_single(1, {5'd8, 5'd0, 1'b1, 21'd0}, 32'h4, rdv, ok);
    vme_single(1, {5'd9, 5'd0, 1'b1, 21'd0}, 32'h6, rdv, ok);
    vme_single(0, {5'd9, 5'd0, 1'b1, 21'd0}, 0, rdv, ok);
    checks++; if (!ok || rdv !== 32'h6) begin failures++; $display("CBLT control read %h", rdv); end
    // hit counts: 7 words per chip
    foreach (nhc[b, c]) begin nhc[b][c] = 7; nhd[b][c] = int'($urandom % 97); end
    nhd[1][0] = 0; nhd[1][1] = 0;
    load(nhc, nhd, exp_hc, exp_hd);
    cblt(32'hF090_0000, words, eb);
    compare("hit-count CBLT", words, exp_hc);
    checks++; if (!eb) begin failures++; $display("hit-count CBLT not ended by BERR"); end
    checks++;
    if (!(iack_fall[0] > 0 && iack_fall[1] > iack_fall[0])) begin
      failures++; $display("IACKOUT order %0d %0d", iack_fall[0], iack_fall[1]);
    end
    cblt(32'hF880_0000, words, eb);
    compare("hit-data CBLT", words, exp_hd);
    checks++; if (!eb) begin failures++; $display("hit-data CBLT not ended by BERR"); end
    // board 8 taken out of the chain: it passes the transfer on untouched
    vme_single(1, {5'd8, 5'd0, 1'b1, 21'd0}, 32'h0, rdv, ok);
    load(nhc, nhd, exp_hc, exp_hd);
    for (int k = 0; k < 14; k++) exp_hc.delete(14);
    cblt(32'hF090_0000, words, eb);
    checks++;
    // board 8 disabled never drives, so its IACKOUT* follows IACKIN*, and its words stay
    if (words.size() != 28 || !eb) begin failures++; $display("chain without board 8: %0d words", words.size()); end
    $display("CBLT transfers ended by BERR: %0d", n_berr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
