// readout_fifo: a VME read-out buffer (hit count or hit data) of a TDC chip.
//
// A synchronous first-in first-out memory of 32-bit words. The edge detector writes
// an event's words; VME reads pop them, single cycles or CBLT block transfers. The
// data of the oldest word is always visible on rdata, and a pop removes it. empty
// feeds the CBLT logic (a chip with an empty buffer hands the transfer on), and
// room tells the writer that a whole largest event still fits. Depths are this
// design's choice: two events of the largest size, rounded up to a power of two.
module readout_fifo #(
  parameter int DEPTH = 256,
  parameter int ROOM  = 96      // words of free space reported as room
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr,
  input  logic [31:0] wdata,
  input  logic        pop,
  output logic [31:0] rdata,
  output logic        empty,
  output logic        room,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);
  logic [31:0]   mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_pop;

  assign empty  = (count == 0);
  assign room   = (int'(count) + ROOM <= DEPTH);
  assign do_pop = pop && !empty;
  assign do_wr  = wr && (int'(count) < DEPTH);
  assign rdata  = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr)  wp <= wp + 1'b1;
      if (do_pop) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_pop);
    end
  end

  // the writer checks room before an event, so a write never meets a full buffer
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) wr |-> int'(count) < DEPTH);
endmodule
