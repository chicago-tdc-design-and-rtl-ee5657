// tb_xft_daq: the XFT DAQ with a random 18-bit word stream on the 22 ns clock. Two L1As
// one CDF clock (6 cycles) apart, then L2As; the read-out buffer, read from the 12 ns
// side, must hold the L2-length words that left the pipeline after each L1A, which are
// the stream words written pipe_dly cycles before. Ready must rise and fall with the
// copy and the release.
module tb_xft_daq;
  localparam int XW = 18;
  logic clk22 = 0, clk12 = 0, rst = 1, l1a = 0, l2a = 0, release_req = 0;
  logic [XW-1:0] xft_data = 0, rdata;
  logic [8:0] pipe_dly = 9'd40;
  logic [6:0] l2_len = 7'd20;
  logic [5:0] raddr = 0;
  logic ready, l1a_overflow;
  logic [XW-1:0] hist [8192];
  int t22 = 0, checks = 0, failures = 0;
  int l1_at [$];

  xft_daq #(.XW(XW), .PIPE_DEPTH(512), .NBUF(4), .DEPTH(64)) dut (
    .clk22, .rst22(rst), .xft_data, .l1a, .l2a, .pipe_dly, .l2_len, .l1a_overflow,
    .clk12, .rst12(rst), .raddr, .rdata, .release_req, .ready);
  always #11ns clk22 = ~clk22;
  always #6ns clk12 = ~clk12;

  always @(posedge clk22) if (!rst) begin
    hist[t22 % 8192] = xft_data;
    if (l1a) l1_at.push_back(t22);
    t22++;
  end
  always @(negedge clk22) xft_data <= XW'($urandom);

  task automatic get_event(int k);
    automatic int w0 = 0;
    @(negedge clk22); l2a = 1; @(negedge clk22); l2a = 0;
    fork begin
      #5us;
    end begin
      wait (ready);
    end join_any
    disable fork;
    checks++;
    if (!ready) begin failures++; $display("event %0d never ready", k); return; end
    for (int i = 0; i < int'(l2_len); i++) begin
      @(negedge clk12); raddr = 6'(i);
      @(negedge clk12);
      // word i left the pipe i+1 cycles after the L1A, written pipe_dly+1 cycles earlier
      w0 = l1_at[k] + 1 + i - int'(pipe_dly) - 1;
      checks++;
      if (rdata !== hist[w0 % 8192]) begin failures++; $display("ev %0d word %0d: %h exp %h", k, i, rdata, hist[w0 % 8192]); end
    end
    @(negedge clk12); release_req = 1; @(negedge clk12); release_req = 0;
    #200ns;
    checks++;
    if (ready) begin failures++; $display("ready not cleared"); end
  endtask

  initial begin
    #100ns rst = 0;
    #2us;
    @(negedge clk22); l1a = 1; @(negedge clk22); l1a = 0;
    repeat (5) @(negedge clk22);
    l1a = 1; @(negedge clk22); l1a = 0;
    #1us;
    get_event(0);
    get_event(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
