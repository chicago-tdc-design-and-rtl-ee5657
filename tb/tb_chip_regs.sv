// tb_chip_regs: local-bus writes and reads of every control register (value on the
// output and read back), test-data RAM write decoding, read-out buffer pops, reads of
// the XFT DAQ and XFT-OUT-RAM through mock memories with one cycle latency, the status
// word, and the one-cycle ack.
module tb_chip_regs;
  import tdc_pkg::*;
  logic clk = 0, rst = 1;
  lbus_req_t req = '0;
  lbus_rsp_t rsp;
  logic sel_test, xram_run, cal_local, tram_wr, hc_pop, hd_pop, xdaq_release, reconfig;
  logic [47:0] mask;
  logic [8:0] pipe_dly, xpipe_dly, tram_row, xram_raddr;
  logic [6:0] l2_len, xl2_len;
  logic [3:0] xft_start, tram_slice;
  logic [23:0] xft_width;
  logic [7:0] cal_dly;
  logic [31:0] tram_data, hc_rdata = 32'h1234_5678, hd_rdata = 32'h9abc_def0;
  logic hc_empty = 0, hd_empty = 1, xdaq_ready = 1, l1a_ovf = 0;
  logic [5:0] xdaq_raddr;
  logic [17:0] xdaq_rdata;
  logic [18:0] xram_rdata;
  logic [9:0] xram_nwords = 10'd77;
  int checks = 0, failures = 0, n_tram = 0, n_hc = 0, n_hd = 0, n_rel = 0, n_rc = 0;

  chip_regs dut (.clk, .rst, .req, .rsp, .sel_test, .xram_run, .cal_local, .mask, .pipe_dly,
    .l2_len, .xpipe_dly, .xl2_len, .xft_start, .xft_width, .cal_dly, .tram_wr, .tram_row,
    .tram_slice, .tram_data, .hc_rdata, .hc_empty, .hc_pop, .hd_rdata, .hd_empty, .hd_pop,
    .xdaq_raddr, .xdaq_rdata, .xdaq_ready, .xdaq_release, .xram_raddr, .xram_rdata,
    .xram_nwords, .l1a_ovf, .reconfig);
  always #6ns clk = ~clk;
  always @(posedge clk) begin
    xdaq_rdata <= {12'h3A5, xdaq_raddr};
    xram_rdata <= {10'h155, xram_raddr};
    if (tram_wr) begin
      n_tram++;
      if (tram_row != 9'd300 || tram_slice != 4'd7 || tram_data != 32'hCAFE0001) begin
        failures++; $display("test RAM write decode");
      end
    end
    n_hc += hc_pop; n_hd += hd_pop; n_rel += xdaq_release; n_rc += reconfig;
  end

  task automatic wr(logic [15:0] a, logic [31:0] d);
    @(negedge clk); req = '{rd: 1'b0, wr: 1'b1, addr: a, wdata: d};
    @(negedge clk); req = '0;
    checks++; if (!rsp.ack) begin failures++; $display("no ack for write %h", a); end
  endtask
  task automatic rd(logic [15:0] a, output logic [31:0] d);
    @(negedge clk); req = '{rd: 1'b1, wr: 1'b0, addr: a, wdata: 32'd0};
    @(negedge clk); req = '0;
    checks++; if (!rsp.ack) begin failures++; $display("no ack for read %h", a); end
    d = rsp.rdata;
  endtask
  task automatic expect32(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk); rst = 0;
    // reset values
    expect32("reset pipe", 32'(pipe_dly), 100);
    expect32("reset l2len", 32'(l2_len), 34);
    wr(A_CTRL, 32'h7);
    expect32("ctrl", {sel_test, xram_run, cal_local}, 32'h7);
    wr(A_MASK_LO, 32'hDEAD_BEEF); wr(A_MASK_HI, 32'h0000_A5A5);
    expect32("mask lo", mask[31:0], 32'hDEAD_BEEF);
    expect32("mask hi", 32'(mask[47:32]), 32'hA5A5);
    wr(A_PIPE_DLY, 9'd511); wr(A_L2_LEN, 7'd64); wr(A_XPIPE_DLY, 9'd222); wr(A_XL2_LEN, 7'd9);
    wr(A_XFT_START, 4'd3); wr(A_XFT_WIDTH, 24'h123456); wr(A_CAL_DLY, 8'd200);
    expect32("pipe", 32'(pipe_dly), 511); expect32("l2", 32'(l2_len), 64);
    expect32("xpipe", 32'(xpipe_dly), 222); expect32("xl2", 32'(xl2_len), 9);
    expect32("xstart", 32'(xft_start), 3); expect32("xwidth", 32'(xft_width), 32'h123456);
    expect32("cal", 32'(cal_dly), 200);
    rd(A_PIPE_DLY, d); expect32("rb pipe", d, 511);
    rd(A_XFT_WIDTH, d); expect32("rb width", d, 32'h123456);
    rd(A_MASK_HI, d); expect32("rb mask hi", d, 32'hA5A5);
    rd(A_CTRL, d); expect32("rb ctrl", d, 32'h7);
    wr(A_TRAM_BASE + 16'd300 * 16 + 16'd7, 32'hCAFE0001);
    expect32("tram writes", n_tram, 1);
    rd(A_HITCOUNT, d); expect32("hit count", d, 32'h1234_5678);
    rd(A_HITDATA, d); expect32("hit data", d, 32'h9abc_def0);
    expect32("pops", {n_hc, n_hd}, {32'd1, 32'd1});
    rd(A_XDAQ_BASE + 16'd37, d); expect32("xdaq", d, {14'd0, 12'h3A5, 6'd37});
    rd(A_XRAM_BASE + 16'd400, d); expect32("xram", d, {13'd0, 10'h155, 9'd400});
    @(negedge clk); l1a_ovf = 1; @(negedge clk); l1a_ovf = 0;
    rd(A_STATUS, d); expect32("status", d, {6'd0, 10'd77, 12'd0, 1'b1, 1'b1, 1'b1, 1'b0});
    wr(A_CTRL, 32'h300);
    rd(A_STATUS, d); expect32("status cleared", d[3:0], 4'b0110);
    wr(A_XDAQ_BASE, 0);
    expect32("release, reconfig", {n_rel, n_rc}, {32'd1, 32'd1});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
