// tb_l2_buffers: the input stream is a cycle counter, so every recorded word tells
// which cycle it came from. Checks: an L2A with no L1A returns the power-up content
// of buffer 0; four L1As one CDF clock (11 cycles) apart fill all four buffers while
// they overlap in time; a fifth L1A is dropped and flagged; the four L2As return the
// four events oldest first, each starting at the word after its L1A; the copy finishes
// within len + 4 cycles; a buffer is accepted again after its L2A; with all four
// buffers full, an L1A one CDF clock after an L2A reuses the buffer being copied
// without disturbing the copy, and both events read back correctly.
module tb_l2_buffers;
  localparam int W = 32, NBUF = 4, DEPTH = 64;
  logic clk = 0, rst = 1, l1a = 0, l2a = 0, ro_release = 0;
  logic [6:0] len = 7'd34;
  logic [W-1:0] din = 0, ro_rdata;
  logic [5:0] ro_raddr = 0;
  logic l1a_overflow, ro_ready;
  logic [NBUF-1:0] buf_busy;
  int checks = 0, failures = 0, n_ovf = 0;
  int cyc = 0;
  int l1_at [$];

  l2_buffers #(.W(W), .NBUF(NBUF), .DEPTH(DEPTH)) dut (
    .clk, .rst, .len, .din, .l1a, .l2a, .l1a_overflow, .ro_ready, .ro_raddr, .ro_rdata,
    .ro_release, .rclk(clk), .buf_busy);

  always #6ns clk = ~clk;
  always @(negedge clk) begin cyc++; din <= W'(cyc); end
  always @(posedge clk) if (!rst && l1a_overflow) n_ovf++;
  always @(posedge clk) if (l1a) l1_at.push_back(int'(din));

  function automatic logic [W-1:0] power_up(int w);
    logic [W-1:0] r = '0;
    if (w inside {1, 5, 9, 13}) for (int k = 0; k < W; k++) r[k] = (k % 10 >= 6);
    return r;
  endfunction

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1;
    @(negedge clk); s = 0;
  endtask

  task automatic check_event(input int first, input bit pup);
    for (int i = 0; i < int'(len); i++) begin
      ro_raddr = 6'(i);
      @(negedge clk);
      checks++;
      if (ro_rdata !== (pup ? power_up(i) : W'(first + i))) begin
        failures++; $display("word %0d: got %h exp %h", i, ro_rdata, pup ? power_up(i) : W'(first + i));
      end
    end
    pulse(ro_release);
  endtask

  task automatic l2a_and_check(input int first, input bit pup);
    automatic int t0;
    pulse(l2a);
    t0 = cyc;
    while (!ro_ready && cyc < t0 + 200) @(negedge clk);
    checks++;
    if (cyc - t0 > int'(len) + 4) begin failures++; $display("copy took %0d cycles", cyc - t0); end
    check_event(first, pup);
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    // test with the power-up content only
    l2a_and_check(0, 1);
    // four L1As, 11 cycles apart
    for (int n = 0; n < 4; n++) begin
      @(negedge clk); l1a = 1;
      @(negedge clk); l1a = 0;
      repeat (9) @(negedge clk);
    end
    checks++;
    if (buf_busy !== 4'hF) begin failures++; $display("buffers busy %b", buf_busy); end
    pulse(l1a);
    repeat (2) @(negedge clk);
    checks++;
    if (n_ovf != 1) begin failures++; $display("overflow count %0d", n_ovf); end
    repeat (60) @(negedge clk);
    // the events come back oldest first
    l2a_and_check(l1_at[0] + 1, 0);
    l2a_and_check(l1_at[1] + 1, 0);
    l2a_and_check(l1_at[2] + 1, 0);
    l2a_and_check(l1_at[3] + 1, 0);
    checks++;
    if (buf_busy !== 4'h0) begin failures++; $display("buffers not freed %b", buf_busy); end
    // accepted again after the L2As
    @(negedge clk); l1a = 1;
    @(negedge clk); l1a = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (n_ovf != 1) begin failures++; $display("L1A refused after free"); end
    l2a_and_check(l1_at[5] + 1, 0);
    // all four buffers full again; an L1A on the CDF clock after an L2A reuses the
    // buffer being copied, and the copy still returns the old event intact
    for (int n = 0; n < 4; n++) begin
      pulse(l1a);
      repeat (9) @(negedge clk);
    end
    repeat (60) @(negedge clk);
    pulse(l2a);
    repeat (9) @(negedge clk);
    pulse(l1a);
    repeat (2) @(negedge clk);
    checks++;
    if (n_ovf != 1) begin failures++; $display("L1A on the next CDF clock after L2A refused"); end
    while (!ro_ready) @(negedge clk);
    check_event(l1_at[6] + 1, 0);
    l2a_and_check(l1_at[7] + 1, 0);
    l2a_and_check(l1_at[8] + 1, 0);
    l2a_and_check(l1_at[9] + 1, 0);
    l2a_and_check(l1_at[10] + 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
