// tb_xft_block: random short pulses on the 18 XFT wires, 12 ns and 22 ns clocks and a
// 132 ns CDF clock (ticks made by cdf_sync). A model keeps every sample, decides for
// each 12 ns cycle whether four successive samples were high, places the cycle in one
// of the six programmed windows, and builds the expected flags per CDF period. Each
// P3 frame (six words, strobe on the first) must carry the flags of the period that
// began two CDF clocks before it, word k holding window k.
module tb_xft_block;
  localparam int N = 48, SER = 10, XW = 18;
  logic clk12 = 0, clk22 = 0, cdf_clk = 0, rst = 1;
  logic [N*SER-1:0] din = '0;
  logic tick12, tick22, d0, d1, d2, d3, d4, d5;
  logic [3:0] ph12, phase22;
  logic [3:0] start = 4'd1;
  logic [23:0] width = {4'd2, 4'd1, 4'd3, 4'd1, 4'd2, 4'd1}; // windows 0..5: 1,2,1,3,1,2
  logic [XW-1:0] p3_data;
  logic p3_strobe;
  int checks = 0, failures = 0, nflags = 0;
  logic [XW-1:0] expf [256][6];
  int frame = -1, cyc = 0, outn = 0, wk = 6;
  logic [2:0] prev [XW];
  int remain [XW];

  xft_block #(.N(N), .SER(SER), .XW(XW), .FIRST(0), .NWIN(6)) dut (
    .clk12, .rst12(rst), .tick12, .din, .start, .width,
    .clk22, .rst22(rst), .tick22, .p3_data, .p3_strobe);
  cdf_sync s12 (.clk(clk12), .rst, .cdf_clk, .l1a(1'b0), .l2a(1'b0), .b0(1'b0), .tick(tick12),
                .l1a_p(d0), .l2a_p(d1), .b0_p(d2), .phase(ph12));
  cdf_sync s22 (.clk(clk22), .rst, .cdf_clk, .l1a(1'b0), .l2a(1'b0), .b0(1'b0), .tick(tick22),
                .l1a_p(d3), .l2a_p(d4), .b0_p(d5), .phase(phase22));

  always #6ns clk12 = ~clk12;
  always #11ns clk22 = ~clk22;
  initial begin #3ns; forever begin cdf_clk = 1; #66ns cdf_clk = 0; #66ns; end end

  // stimulus: pulses of 1..8 samples, started with 3 % chance per sample
  always @(negedge clk12) begin
    for (int i = 0; i < XW; i++)
      for (int k = SER - 1; k >= 0; k--) begin
        if (remain[i] == 0 && $urandom % 100 < 3) remain[i] = 1 + int'($urandom % 8);
        din[i*SER + k] = (remain[i] > 0);
        if (remain[i] > 0) remain[i]--;
      end
  end

  // model, evaluated with the data of the current 12 ns cycle
  always @(posedge clk12) if (!rst) begin
    automatic int b = int'(start);
    if (tick12) begin
      frame++; cyc = 0;
      for (int k = 0; k < 6; k++) expf[frame % 256][k] = '0;
    end else cyc++;
    for (int i = 0; i < XW; i++) begin
      automatic logic [12:0] s = {prev[i], din[i*SER +: SER]};
      automatic bit h = 0;
      for (int k = 0; k <= 9; k++) if (s[k +: 4] == 4'hF) h = 1;
      b = int'(start);
      if (frame >= 0)
        for (int k = 0; k < 6; k++) begin
          if (cyc >= b && cyc < b + int'(width[4*k +: 4]) && h) expf[frame % 256][k][i] = 1'b1;
          b += int'(width[4*k +: 4]);
        end
      prev[i] = din[i*SER +: 3];
    end
  end

  // P3 output
  always @(posedge clk22) if (!rst) begin
    if (p3_strobe) begin outn++; wk = 0; end
    if (wk < 6) begin
      // output frame outn was taken from the period two CDF clocks earlier
      if (outn >= 3) begin
        checks++;
        if (p3_data !== expf[(outn - 3) % 256][wk]) begin
          failures++; $display("frame %0d word %0d: got %h exp %h", outn - 3, wk, p3_data, expf[(outn-3)%256][wk]);
        end
        nflags += $countones(p3_data);
      end
      wk++;
    end
  end

  initial begin
    for (int i = 0; i < XW; i++) begin remain[i] = 0; prev[i] = '0; end
    #100ns rst = 0;
    #40us;
    checks++;
    if (outn < 250 || nflags == 0) begin failures++; $display("frames %0d flags %0d", outn, nflags); end
    $display("frames %0d flags %0d", outn, nflags);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
