// tb_tdc_chip: one TDC chip from LVDS pulses to VME read-out. Wire w gets a 6-sample
// pulse starting 7w samples after a reference time; wire 5 gets a second pulse and
// wire 9 six pulses (only four may be kept); wire 47 gets only a 3-sample pulse (no
// hit). After the pipeline delay an L1A, and later an L2A, are given on CDF clock edges.
// The hit-count and hit-data words read over the local bus must show the right counts
// per wire and hit times whose differences equal the pulse spacings in 1.2 ns units.
// The XFT output must deliver one strobed frame per CDF clock, with flags set.
module tb_tdc_chip;
  import tdc_pkg::*;
  logic clk_fast = 1, clk12 = 0, clk22 = 0, cdf_clk = 0, rst = 1;
  logic l1a = 0, l2a = 0, b0 = 0, cal_bp = 0, cal_out, reconfig, hc_empty, hd_empty;
  logic [N_WIRES-1:0] lvds_in = '0;
  lbus_req_t lreq = '0;
  lbus_rsp_t lrsp;
  logic [XFT_W-1:0] p3_data;
  logic p3_strobe;
  int checks = 0, failures = 0;
  longint nsamp = 0;
  longint p0 = -1;              // sample index of the reference time
  int n_strobe = 0, n_xflags = 0;

  tdc_chip #(.CHIP_ID(0)) dut (
    .clk_fast, .rst_fast(rst), .clk12, .rst12(rst), .clk22, .rst22(rst), .cdf_clk,
    .l1a, .l2a, .b0, .lvds_in, .lreq, .lrsp, .hc_empty, .hd_empty, .p3_data, .p3_strobe,
    .cal_bp, .cal_out, .reconfig);

  always #600ps clk_fast = ~clk_fast;
  always #6ns clk12 = ~clk12;
  always #11ns clk22 = ~clk22;
  initial begin #3ns; forever begin cdf_clk = 1; #66ns cdf_clk = 0; #66ns; end end
  always @(posedge clk22) if (!rst && p3_strobe) n_strobe++;
  always @(posedge clk22) if (!rst) n_xflags += $countones(p3_data);

  // pulse schedule, relative to p0, in samples
  function automatic bit level(int w, longint s);
    if (s < 0) return 0;
    if (w == 47) return (s >= 7 * w && s < 7 * w + 3);
    if (w == 9) return (s >= 7 * w && s < 7 * w + 6 * 12 && ((s - 7 * w) % 12) < 6);
    if (w == 5 && s >= 400 && s < 406) return 1;
    return (s >= 7 * w && s < 7 * w + 6);
  endfunction
  always @(negedge clk_fast) begin
    nsamp++;
    for (int w = 0; w < N_WIRES; w++) lvds_in[w] <= (p0 >= 0) ? level(w, nsamp - p0) : 1'b0;
  end

  task automatic lb(input bit wr, input logic [15:0] a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk12); lreq = '{rd: !wr, wr: wr, addr: a, wdata: d};
    @(negedge clk12); lreq = '0;
    checks++; if (!lrsp.ack) begin failures++; $display("no ack %h", a); end
    q = lrsp.rdata;
  endtask

  task automatic on_cdf(ref logic s);
    @(posedge cdf_clk); #10ns s = 1;
    @(posedge cdf_clk); #10ns s = 0;
  endtask

  initial begin
    logic [31:0] q, hdr, hc [6];
    int exp_n [N_WIRES];
    int times [N_WIRES][4];
    int nh [N_WIRES];
    int ndw;
    logic [15:0] hits [$];
    #100ns rst = 0;
    lb(1, A_L2_LEN, 64, q);
    #1us;
    @(posedge cdf_clk); #20ns;
    p0 = nsamp + 2;
    // pipe 100 words: L1A about 1.2 us later, 9 CDF clocks
    repeat (8) @(posedge cdf_clk);
    on_cdf(l1a);
    repeat (4) @(posedge cdf_clk);
    on_cdf(l2a);
    #4us;
    // hit count
    lb(0, A_HITCOUNT, 0, hdr);
    for (int k = 0; k < 6; k++) lb(0, A_HITCOUNT, 0, hc[k]);
    for (int w = 0; w < N_WIRES; w++) begin
      exp_n[w] = (w == 47) ? 0 : (w == 9) ? 4 : (w == 5) ? 2 : 1;
      nh[w] = int'(hc[w / 8][4 * (w % 8) +: 4]);
      checks++;
      if (nh[w] != exp_n[w]) begin failures++; $display("wire %0d: %0d hits, exp %0d", w, nh[w], exp_n[w]); end
    end
    ndw = int'(hdr[7:0]);
    checks++;
    if (hdr[31:28] != 4'd0 || ndw != 26) begin failures++; $display("header %h", hdr); end
    for (int k = 0; k < ndw; k++) begin
      lb(0, A_HITDATA, 0, q);
      hits.push_back(q[31:16]);
      if (q[15:0] != 16'hFFFF) hits.push_back(q[15:0]);
    end
    checks++;
    if (!hd_empty || !hc_empty) begin failures++; $display("buffers not empty after read-out"); end
    // hit times relative to wire 0
    foreach (nh[w]) nh[w] = 0;
    foreach (hits[i]) begin
      automatic int w = int'(hits[i][15:10]);
      if (w < N_WIRES && nh[w] < 4) begin times[w][nh[w]] = int'(hits[i][9:0]); nh[w]++; end
    end
    $display("reference hit time %0d samples into the L2 window", times[0][0]);
    checks++;
    if (times[0][0] < 5 || times[0][0] > 300) begin failures++; $display("window misplaced"); end
    for (int w = 1; w < 47; w++) begin
      checks++;
      if (times[w][0] - times[0][0] != 7 * w) begin
        failures++; $display("wire %0d time %0d, ref %0d", w, times[w][0], times[0][0]);
      end
    end
    checks++;
    if (times[5][1] - times[0][0] != 400) begin failures++; $display("wire 5 second hit"); end
    for (int h = 1; h < 4; h++) begin
      checks++;
      if (times[9][h] - times[9][h-1] != 12) begin failures++; $display("wire 9 hit %0d", h); end
    end
    checks++;
    if (n_strobe < 40 || n_xflags == 0) begin failures++; $display("XFT frames %0d flags %0d", n_strobe, n_xflags); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
