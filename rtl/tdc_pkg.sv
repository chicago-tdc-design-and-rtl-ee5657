// tdc_pkg: sizes, local-bus types and the register map shared by the TDC board RTL.
//
// One TDC chip receives 48 LVDS wires. Each wire is sampled every 1.2 ns and delivered
// as a 10-bit word every 12 ns, so the chip moves a 480-bit word per 12 ns clock.
// The pipeline holds 512 words (6144 ns); there are four L2 buffers of at most 64
// words; the XFT path produces 18-bit words at a 22 ns clock. These numbers follow
// the document. The local bus between the VME chip and the TDC chips, and the
// register map below, are this design's own choices (the document gives neither).
package tdc_pkg;
  localparam int N_WIRES    = 48;   // LVDS inputs per TDC chip
  localparam int SER        = 10;   // samples per wire per 12 ns word (1.2 ns sampling)
  localparam int WORD_W     = N_WIRES * SER;  // 480
  localparam int PIPE_DEPTH = 512;  // pipeline words, 512 x 12 ns = 6144 ns
  localparam int L2_NBUF    = 4;    // L2 buffers 00, 01, 10, 11
  localparam int L2_DEPTH   = 64;   // max L2 buffer length, 64 x 12 ns = 768 ns
  localparam int MAX_HITS   = 4;    // hits recorded per wire
  localparam int XFT_W      = 18;   // XFT word width to P3 and XFT DAQ
  localparam int XFT_WIN    = 6;    // new-style XFT time windows
  localparam int CDF_T12    = 11;   // 12 ns periods per 132 ns CDF clock
  localparam int CDF_T22    = 6;    // 22 ns periods per 132 ns CDF clock

  // Local bus: one-cycle read or write strobe, answered by ack one cycle later.
  typedef struct packed {
    logic        rd;
    logic        wr;
    logic [15:0] addr;
    logic [31:0] wdata;
  } lbus_req_t;

  typedef struct packed {
    logic        ack;
    logic [31:0] rdata;
  } lbus_rsp_t;

  // TDC chip register map (16-bit word addresses on the local bus)
  localparam logic [15:0] A_CTRL      = 16'h0000; // [0] test-data source, [1] XFT-OUT-RAM run, [2] local calibration pulse
  localparam logic [15:0] A_MASK_LO   = 16'h0001; // wire mask, wires 31..0 (1 = wire masked)
  localparam logic [15:0] A_MASK_HI   = 16'h0002; // wire mask, wires 47..32
  localparam logic [15:0] A_PIPE_DLY  = 16'h0003; // main pipe size in 12 ns words
  localparam logic [15:0] A_L2_LEN    = 16'h0004; // main L2 buffer length in words
  localparam logic [15:0] A_XPIPE_DLY = 16'h0005; // XFT DAQ pipe size in 22 ns words
  localparam logic [15:0] A_XL2_LEN   = 16'h0006; // XFT DAQ L2 buffer length
  localparam logic [15:0] A_XFT_START = 16'h0007; // XFT first window start, 12 ns units
  localparam logic [15:0] A_XFT_WIDTH = 16'h0008; // XFT window widths, 6 x 4 bits, 12 ns units
  localparam logic [15:0] A_CAL_DLY   = 16'h0009; // calibration pulse delay after B0, 12 ns units
  localparam logic [15:0] A_STATUS    = 16'h000A; // read: FIFO empties, overflow flags
  localparam logic [15:0] A_HITCOUNT  = 16'h0010; // read: pop hit-count buffer
  localparam logic [15:0] A_HITDATA   = 16'h0011; // read: pop hit-data buffer
  localparam logic [15:0] A_XDAQ_BASE = 16'h0100; // read: XFT DAQ read-out buffer, 64 words
  localparam logic [15:0] A_XRAM_BASE = 16'h0200; // read: XFT-OUT-RAM, 512 words (0x0200-0x03FF)
  localparam logic [15:0] A_TRAM_BASE = 16'h2000; // write: test-data RAM, row*16 + slice (0x2000-0x3FFF)
endpackage
