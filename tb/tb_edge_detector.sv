// tb_edge_detector: random events through the hit finder, checked against a model
// that works on runs: a run of at least four 1 samples followed by a run of at least
// four 0 samples is a hit, timed at the first 1 of the run, at most four per wire.
// The test plays the read-out RAM (one cycle read latency), collects the hit-count
// and hit-data words and compares them with the model's header, counts and packed
// hits. It also holds the buffer-room input low to see the detector stall, and
// bounds the processing time.
module tb_edge_detector;
  localparam int N = 48, SER = 10, DEPTH = 64, NS = DEPTH * SER;
  logic clk = 0, rst = 1;
  logic [6:0] len;
  logic ro_ready = 0, ro_release, hc_room = 1, hd_room = 1;
  logic [5:0] ro_raddr;
  logic [N*SER-1:0] ro_rdata;
  logic hc_wr, hd_wr, busy;
  logic [31:0] hc_data, hd_data;
  logic [N*SER-1:0] ram [DEPTH];
  logic [31:0] hc_got [$], hd_got [$];
  int checks = 0, failures = 0, stalls = 0;

  edge_detector #(.N(N), .SER(SER), .DEPTH(DEPTH), .MAXH(4)) dut (
    .clk, .rst, .chip_id(4'd5), .len, .ro_ready, .ro_raddr, .ro_rdata, .ro_release,
    .hc_room, .hd_room, .hc_wr, .hc_data, .hd_wr, .hd_data, .busy);

  always #6ns clk = ~clk;
  always @(posedge clk) ro_rdata <= ram[ro_raddr];
  always @(posedge clk) if (!rst) begin
    if (hc_wr) hc_got.push_back(hc_data);
    if (hd_wr) hd_got.push_back(hd_data);
  end

  // sample s of wire i (s = 0 is the oldest)
  function automatic bit smp(int i, int s);
    return ram[s / SER][i*SER + (SER - 1 - s % SER)];
  endfunction

  task automatic fill(int style);
    for (int i = 0; i < N; i++) begin
      automatic int s = 0;
      automatic bit v = (style == 2) ? 1'b1 : 1'($urandom);
      while (s < NS) begin
        automatic int r = (style == 0) ? 1 + int'($urandom % 9) : 1 + int'($urandom % 30);
        for (int k = 0; k < r && s < NS; k++, s++) ram[s / SER][i*SER + (SER - 1 - s % SER)] = v;
        v = !v;
      end
    end
  endtask

  task automatic run_event(int l, int evn);
    automatic int nh [N];
    automatic int ht [N][4];
    automatic int total = 0, ndw, t0, tend;
    automatic logic [31:0] exp_hd [$];
    automatic logic [15:0] halves [$];
    len = 7'(l);
    // model
    for (int i = 0; i < N; i++) begin
      automatic int s = 0;
      nh[i] = 0;
      while (s < l * SER) begin
        automatic int st, ones = 0, zeros = 0;
        if (!smp(i, s)) begin s++; continue; end
        st = s;
        while (s < l * SER && smp(i, s)) begin ones++; s++; end
        while (s < l * SER && !smp(i, s) && zeros < 4) begin zeros++; s++; end
        if (ones >= 4 && zeros >= 4 && nh[i] < 4) begin ht[i][nh[i]] = st; nh[i]++; end
      end
      total += nh[i];
      for (int h = 0; h < nh[i]; h++) halves.push_back({6'(i), 10'(ht[i][h])});
    end
    ndw = (total + 1) / 2;
    if (total % 2) halves.push_back(16'hFFFF);
    for (int k = 0; k < ndw; k++) exp_hd.push_back({halves[2*k], halves[2*k+1]});
    hc_got.delete(); hd_got.delete();
    @(negedge clk); ro_ready = 1; t0 = $time / 12ns;
    while (!ro_release) @(negedge clk);
    ro_ready = 0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    tend = $time / 12ns - 2;
    // checks
    checks++;
    if (hc_got.size() != 7) begin failures++; $display("ev %0d: %0d hit-count words", evn, hc_got.size()); end
    else begin
      checks++;
      if (hc_got[0] !== {4'd5, 12'(evn), 8'd0, 8'(ndw)}) begin
        failures++; $display("ev %0d: header %h", evn, hc_got[0]);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (hc_got[1 + i / 8][4*(i%8) +: 4] !== 4'(nh[i])) begin
          failures++; $display("ev %0d: wire %0d count %0d exp %0d", evn, i, hc_got[1+i/8][4*(i%8) +: 4], nh[i]);
        end
      end
    end
    checks++;
    if (hd_got.size() != ndw) begin failures++; $display("ev %0d: %0d hit-data words, exp %0d", evn, hd_got.size(), ndw); end
    else for (int k = 0; k < ndw; k++) begin
      checks++;
      if (hd_got[k] !== exp_hd[k]) begin failures++; $display("ev %0d: hd[%0d] %h exp %h", evn, k, hd_got[k], exp_hd[k]); end
    end
    checks++;
    if (tend - t0 > l + 10 + 7 + N + total + 5) begin failures++; $display("ev %0d took %0d cycles", evn, tend - t0); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    // stall: no room in the hit-data buffer
    hd_room = 0;
    @(negedge clk); ro_ready = 1;
    repeat (20) begin @(negedge clk); if (!busy) stalls++; end
    checks++;
    if (stalls != 20 || busy) begin failures++; $display("detector did not wait for room"); end
    ro_ready = 0; hd_room = 1;
    for (int e = 0; e < 12; e++) begin
      fill(e % 3);
      run_event(e == 3 ? 64 : e == 4 ? 1 : 34, e);
    end
    $display("stall cycles seen: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
