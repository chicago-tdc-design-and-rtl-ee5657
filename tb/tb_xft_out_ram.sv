// tb_xft_out_ram: XFT words (a counter, strobe on every sixth word) are recorded while
// run is on. The reader on the 12 ns clock must find consecutive words with their
// strobes, the count must stop at the memory size, and a second run must restart at
// address 0.
module tb_xft_out_ram;
  localparam int XW = 18, DEPTH = 512;
  logic clk22 = 0, clk12 = 0, rst = 1, run = 0, xft_strobe = 0;
  logic [XW-1:0] xft_data = 0;
  logic [8:0] raddr = 0;
  logic [XW:0] rdata;
  logic [9:0] nwords;
  int checks = 0, failures = 0;
  logic [XW:0] first;

  xft_out_ram #(.XW(XW), .DEPTH(DEPTH)) dut (.clk22, .rst22(rst), .run, .xft_data, .xft_strobe,
    .rclk(clk12), .raddr, .rdata, .nwords);
  always #11ns clk22 = ~clk22;
  always #6ns clk12 = ~clk12;
  always @(posedge clk22) begin
    xft_data   <= xft_data + 1'b1;
    xft_strobe <= ((xft_data + 1'b1) % 6 == 0);
  end

  task automatic read_check(int n);
    for (int a = 0; a < n; a++) begin
      @(negedge clk12); raddr = 9'(a);
      @(negedge clk12);
      if (a == 0) first = rdata;
      checks++;
      if (rdata[XW-1:0] !== XW'(first[XW-1:0] + a) || rdata[XW] !== (rdata[XW-1:0] % 6 == 0)) begin
        failures++; $display("addr %0d: %h (first %h)", a, rdata, first);
      end
    end
  endtask

  initial begin
    #100ns rst = 0;
    @(negedge clk12); run = 1;
    #15us;
    checks++;
    if (nwords != 10'(DEPTH)) begin failures++; $display("nwords %0d", nwords); end
    read_check(DEPTH);
    @(negedge clk12); run = 0;
    #200ns;
    checks++;
    if (nwords != 0) begin failures++; $display("count not cleared"); end
    @(negedge clk12); run = 1;
    #1us;
    checks++;
    if (nwords < 40 || nwords > 48) begin failures++; $display("nwords %0d after 1 us", nwords); end
    read_check(30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
