// tb_test_data_ram: loads a 16-row pattern slice by slice over the write port and
// checks that playback returns rows 0..len-1 in a loop, one row per clock.
module tb_test_data_ram;
  localparam int W = 480, DEPTH = 16, NS = 15;
  logic clk = 0, rst = 1, wr = 0;
  logic [3:0] wrow = 0, wslice = 0;
  logic [31:0] wdata = 0;
  logic [4:0] len = 5'd12;
  logic [W-1:0] dout;
  logic [W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  test_data_ram #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst, .wr, .wrow, .wslice, .wdata, .len, .dout);
  always #6ns clk = ~clk;

  initial begin
    for (int r = 0; r < DEPTH; r++)
      for (int s = 0; s < NS; s++) begin
        automatic logic [31:0] v = $urandom;
        @(negedge clk); wr = 1; wrow = 4'(r); wslice = 4'(s); wdata = v;
        ref_mem[r][s*32 +: 32] = v;
      end
    @(negedge clk); wr = 0; rst = 1;
    @(negedge clk); rst = 0;
    // row 0 is read at the first clock after reset release and shows from then on
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      checks++;
      if (dout !== ref_mem[t % 12]) begin
        failures++; $display("t=%0d row mismatch", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
