// test_data_ram: VME-loaded test pattern that replaces the SERDES data for testing.
//
// The RAM has the same size as the pipeline (512 words of 480 bits, as the document
// states). It is loaded over the local bus 32 bits at a time: a write to slice s
// (0..14) of row r updates bits [32*s+31 : 32*s] of that row (slice 14 holds the last
// 16 bits). Playback reads the rows 0, 1, ..., len-1 and starts again, one row per
// 12 ns clock, so a pattern of len words repeats every len x 12 ns. The slice layout
// and the playback length (equal to the main pipe size) are this design's choices.
//
// Interface: wr/wrow/wslice/wdata load the RAM; len sets the loop length;
// dout is the row read one cycle after its address.
module test_data_ram #(
  parameter int W     = 480,
  parameter int DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr,
  input  logic [$clog2(DEPTH)-1:0] wrow,
  input  logic [3:0]               wslice,
  input  logic [31:0]              wdata,
  input  logic [$clog2(DEPTH):0]   len,
  output logic [W-1:0]             dout
);
  localparam int NS = (W + 31) / 32;
  logic [NS*32-1:0]         mem [DEPTH];
  logic [$clog2(DEPTH)-1:0] raddr;

  always_ff @(posedge clk) begin
    if (wr && wslice < 4'(NS)) mem[wrow][wslice*32 +: 32] <= wdata;
    dout <= mem[raddr][W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) raddr <= '0;
    else if ({1'b0, raddr} + 1'b1 >= len) raddr <= '0;
    else raddr <= raddr + 1'b1;
  end
endmodule
