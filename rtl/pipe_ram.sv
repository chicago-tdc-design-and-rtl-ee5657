// pipe_ram: the circular pipeline RAM ("The Pipe").
//
// Every clock the incoming word is written at the write pointer, which then advances
// around the DEPTH-word ring. The word written dly cycles earlier is read back at the
// same time, so dout is din delayed by dly + 1 clocks: the pipe size sets the Level-1
// trigger latency the data waits out. With the document's 512 words at 12 ns the
// longest latency is 6144 ns. dly is programmable (1..DEPTH-1). The ring with a read
// pointer trailing the write pointer is how the document draws the pipe; the
// pointer arithmetic is this design's.
//
// Interface: din is written each clk; dout is the delayed stream.
module pipe_ram #(
  parameter int W     = 480,
  parameter int DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(DEPTH)-1:0] dly,
  input  logic [W-1:0]             din,
  output logic [W-1:0]             dout
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr;
  logic [AW-1:0] rptr;

  assign rptr = wptr - dly;

  always_ff @(posedge clk) begin
    if (rst) wptr <= '0;
    else     wptr <= wptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    mem[wptr] <= din;
    dout      <= mem[rptr];
  end
endmodule
