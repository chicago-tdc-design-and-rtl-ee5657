// mux_mask: selects the data source of a TDC chip and masks wires.
//
// When sel_test is 1 the test-data RAM output is used, otherwise the SERDES output.
// A wire whose mask bit is 1 has all ten of its samples forced to 0, so it can give
// neither hits nor XFT flags. The result is registered (one 12 ns cycle of latency).
// The document names this block only; the select bit and per-wire mask are this
// design's reading of "MUX MASK".
module mux_mask #(
  parameter int N   = 48,
  parameter int SER = 10
) (
  input  logic             clk,
  input  logic             sel_test,
  input  logic [N-1:0]     mask,
  input  logic [N*SER-1:0] serdes_d,
  input  logic [N*SER-1:0] test_d,
  output logic [N*SER-1:0] dout
);
  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++)
      dout[i*SER +: SER] <= mask[i] ? '0 : (sel_test ? test_d[i*SER +: SER] : serdes_d[i*SER +: SER]);
  end
endmodule
