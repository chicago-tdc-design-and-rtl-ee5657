// serdes_rx: 1:10 deserialiser for the LVDS wire inputs of a TDC chip.
//
// Every wire is sampled on each edge of the fast clock (1.2 ns period, the 1.2 ns
// sampling rate of the document). Ten successive samples of a wire form one 10-bit
// word; bit 9 holds the oldest sample and bit 0 the newest (this order is a choice
// of this design; the document only names the outputs serdes_out[9:0]). The word is
// handed over to the 12 ns clock domain through a holding register that is stable
// for ten fast periods, so the 12 ns clock, derived from the same PLL, samples it
// safely.
//
// Interface: clk_fast/rst_fast drive the sampling side, clk12 the word side.
// din[N-1:0] are the wires; dout[N*10-1:0] packs wire i in bits [10*i+9 : 10*i].
// Timing: a sample appears in dout one or two 12 ns cycles after its word is complete.
// In the FPGA this is the hard LVDS receiver; here it is plain logic.
module serdes_rx #(
  parameter int N   = 48,
  parameter int SER = 10
) (
  input  logic             clk_fast,
  input  logic             rst_fast,
  input  logic [N-1:0]     din,
  input  logic             clk12,
  output logic [N*SER-1:0] dout
);
  logic [$clog2(SER)-1:0] cnt;
  logic [SER-2:0]         sh   [N];
  logic [N*SER-1:0]       hold;

  always_ff @(posedge clk_fast) begin
    if (rst_fast) begin
      cnt <= '0;
      for (int i = 0; i < N; i++) sh[i] <= '0;
      hold <= '0;
    end else begin
      cnt <= (cnt == $bits(cnt)'(SER - 1)) ? '0 : cnt + 1'b1;
      for (int i = 0; i < N; i++) begin
        sh[i] <= {sh[i][SER-3:0], din[i]};
        if (cnt == $bits(cnt)'(SER - 1)) hold[i*SER +: SER] <= {sh[i], din[i]};
      end
    end
  end

  always_ff @(posedge clk12) dout <= hold;
endmodule
