// xft_daq: data acquisition of the XFT words, alongside the main data path.
//
// The 18-bit XFT words, one per 22 ns clock, enter a pipeline and four L2 buffers
// built like those of the main path (same numbers of words), whose pipe size and
// L2 length are set independently of the main path, as the document describes. An
// L2A copies the selected L2 buffer into a read-out buffer that VME reads by address
// (it is not part of CBLT). The VME side runs on the 12 ns clock: ready is brought
// over with two flip-flops, and a release request (a VME write) crosses back as a
// toggle. Trigger pulses l1a/l2a come from a cdf_sync in the 22 ns domain.
module xft_daq #(
  parameter int XW         = 18,
  parameter int PIPE_DEPTH = 512,
  parameter int NBUF       = 4,
  parameter int DEPTH      = 64
) (
  input  logic                          clk22,
  input  logic                          rst22,
  input  logic [XW-1:0]                 xft_data,
  input  logic                          l1a,
  input  logic                          l2a,
  input  logic [$clog2(PIPE_DEPTH)-1:0] pipe_dly,
  input  logic [$clog2(DEPTH):0]        l2_len,
  output logic                          l1a_overflow,
  // VME side, 12 ns domain
  input  logic                          clk12,
  input  logic                          rst12,
  input  logic [$clog2(DEPTH)-1:0]      raddr,
  output logic [XW-1:0]                 rdata,
  input  logic                          release_req,
  output logic                          ready
);
  logic [XW-1:0] pipe_out;
  logic          ro_ready;
  logic          rel_tog12;
  logic [2:0]    rel_s;
  logic [1:0]    rdy_s;
  logic [NBUF-1:0] busy_unused;

  pipe_ram #(.W(XW), .DEPTH(PIPE_DEPTH)) u_pipe (
    .clk(clk22), .rst(rst22), .dly(pipe_dly), .din(xft_data), .dout(pipe_out));

  l2_buffers #(.W(XW), .NBUF(NBUF), .DEPTH(DEPTH)) u_l2 (
    .clk(clk22), .rst(rst22), .len(l2_len), .din(pipe_out),
    .l1a(l1a), .l2a(l2a), .l1a_overflow(l1a_overflow),
    .ro_ready(ro_ready), .ro_raddr(raddr), .ro_rdata(rdata),
    .ro_release(rel_s[2] ^ rel_s[1]), .rclk(clk12), .buf_busy(busy_unused));

  always_ff @(posedge clk12) begin
    if (rst12) begin
      rel_tog12 <= 1'b0;
      rdy_s     <= '0;
    end else begin
      if (release_req) rel_tog12 <= ~rel_tog12;
      rdy_s <= {rdy_s[0], ro_ready};
    end
  end
  assign ready = rdy_s[1];

  always_ff @(posedge clk22) begin
    if (rst22) rel_s <= '0;
    else       rel_s <= {rel_s[1:0], rel_tog12};
  end
endmodule
