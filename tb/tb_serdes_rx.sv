// tb_serdes_rx: checks the 1:10 deserialiser against a record of the applied samples.
// Random bits are driven on 4 wires every 1.2 ns; each 12 ns output word of wire i must
// equal ten successive recorded samples (oldest in bit 9), words must follow one another
// without gaps, and a word must appear within two 12 ns cycles of its last sample.
module tb_serdes_rx;
  localparam int N = 4, SER = 10;
  logic clk_fast = 0, clk12 = 0, rst_fast = 1;
  logic [N-1:0] din = '0;
  logic [N*SER-1:0] dout;
  int checks = 0, failures = 0;
  logic [N-1:0] hist [4096];
  int nsamp = 0;
  int k_next = -1;

  serdes_rx #(.N(N), .SER(SER)) dut (.clk_fast, .rst_fast, .din, .clk12, .dout);

  always #600ps clk_fast = ~clk_fast;
  always #6000ps clk12 = ~clk12;

  always @(negedge clk_fast) din <= N'($urandom);
  always @(posedge clk_fast) if (!rst_fast && nsamp < 4096) begin hist[nsamp] = din; nsamp++; end

  function automatic logic [N*SER-1:0] expect_word(int k);
    logic [N*SER-1:0] w;
    for (int i = 0; i < N; i++)
      for (int s = 0; s < SER; s++) w[i*SER + (SER-1-s)] = hist[k*SER + s][i];
    return w;
  endfunction

  always @(negedge clk12) if (!rst_fast && nsamp > 40) begin
    if (k_next < 0) begin
      for (int k = 0; k * SER + SER <= nsamp; k++)
        if (expect_word(k) == dout) k_next = k + 1;
      checks++;
      if (k_next < 0) begin failures++; $display("no word matches the first output"); end
    end else begin
      checks++;
      if (dout !== expect_word(k_next)) begin
        failures++;
        $display("word %0d mismatch: got %h exp %h", k_next, dout, expect_word(k_next));
      end
      checks++;
      if (nsamp - (k_next * SER + SER) > 2 * SER) begin
        failures++; $display("latency too long at word %0d", k_next);
      end
      k_next++;
    end
  end

  initial begin
    repeat (3) @(posedge clk12);
    @(negedge clk_fast); rst_fast = 0;
    repeat (200) @(posedge clk12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
