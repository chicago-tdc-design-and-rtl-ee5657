// tb_readout_fifo: random writes and pops against a queue model; checks data order,
// empty, the room flag and the word count.
module tb_readout_fifo;
  localparam int DEPTH = 16, ROOM = 7;
  logic clk = 0, rst = 1, wr = 0, pop = 0;
  logic [31:0] wdata = 0, rdata;
  logic empty, room;
  logic [4:0] count;
  logic [31:0] q [$];
  int checks = 0, failures = 0;

  readout_fifo #(.DEPTH(DEPTH), .ROOM(ROOM)) dut (.clk, .rst, .wr, .wdata, .pop, .rdata, .empty, .room, .count);
  always #6ns clk = ~clk;

  initial begin
    @(negedge clk); rst = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || count !== 5'(q.size()) || room !== (q.size() + ROOM <= DEPTH)) begin
        failures++; $display("t=%0d flags: empty=%b count=%0d room=%b model=%0d", t, empty, count, room, q.size());
      end
      if (q.size() != 0) begin
        checks++;
        if (rdata !== q[0]) begin failures++; $display("t=%0d data %h exp %h", t, rdata, q[0]); end
      end
      wr  = (q.size() < DEPTH) && ($urandom % 2 == 0);
      pop = ($urandom % 3 == 0);
      wdata = $urandom;
      if (pop && q.size() != 0) void'(q.pop_front());
      if (wr) q.push_back(wdata);
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
