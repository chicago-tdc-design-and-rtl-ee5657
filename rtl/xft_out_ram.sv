// xft_out_ram: test memory that records the XFT words sent to P3.
//
// While run is 1, every 22 ns XFT word (18 bits plus the strobe as bit 18) is written
// at the next address of a DEPTH-word memory; the address returns to 0 each time run
// is switched on and the recording stops when the memory is full, so a VME reader
// finds the words in order. The read port is in the 12 ns (VME access) domain, one
// cycle latency. The document says only that the chip has an XFT-OUT-RAM holding the
// XFT flags for testing; the depth, the run control and the stop-when-full rule are
// this design's choices. run comes from the 12 ns domain and is synchronised here.
module xft_out_ram #(
  parameter int XW    = 18,
  parameter int DEPTH = 512
) (
  input  logic                     clk22,
  input  logic                     rst22,
  input  logic                     run,
  input  logic [XW-1:0]            xft_data,
  input  logic                     xft_strobe,
  input  logic                     rclk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [XW:0]              rdata,
  output logic [$clog2(DEPTH):0]   nwords
);
  localparam int AW = $clog2(DEPTH);
  logic [XW:0]  mem [DEPTH];
  logic [1:0]   run_s;
  logic [AW:0]  wa;

  assign nwords = wa;

  always_ff @(posedge clk22) begin
    if (rst22) begin
      run_s <= '0;
      wa    <= '0;
    end else begin
      run_s <= {run_s[0], run};
      if (!run_s[1]) wa <= '0;
      else if (int'(wa) < DEPTH) wa <= wa + 1'b1;
    end
  end

  always_ff @(posedge clk22)
    if (run_s[1] && int'(wa) < DEPTH) mem[wa[AW-1:0]] <= {xft_strobe, xft_data};

  always_ff @(posedge rclk) rdata <= mem[raddr];
endmodule
