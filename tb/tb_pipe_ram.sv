// tb_pipe_ram: feeds a counting-plus-random stream into a 512-word pipe and checks
// that the output is the input delayed by dly + 1 clocks, for several pipe sizes
// including the largest (511 words).
module tb_pipe_ram;
  localparam int W = 32, DEPTH = 512;
  logic clk = 0, rst = 1;
  logic [8:0] dly;
  logic [W-1:0] din, dout;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;
  int dlys [4] = '{1, 17, 100, 511};

  pipe_ram #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst, .dly, .din, .dout);
  always #6ns clk = ~clk;

  initial begin
    foreach (dlys[j]) begin
      dly = 9'(dlys[j]);
      hist.delete();
      @(negedge clk); rst = 1;
      @(negedge clk); rst = 0;
      for (int t = 0; t < dlys[j] + 300; t++) begin
        din = $urandom;
        hist.push_back(din);
        @(negedge clk);
        // after this clock, dout holds the word written dly+1 clocks before the current one
        if (hist.size() > dlys[j] + 1) begin
          checks++;
          if (dout !== hist[hist.size() - 1 - dlys[j]]) begin
            failures++; $display("dly=%0d t=%0d got %h exp %h", dlys[j], t, dout, hist[hist.size()-1-dlys[j]]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
