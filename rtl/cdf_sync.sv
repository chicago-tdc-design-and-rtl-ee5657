// cdf_sync: brings the CDF clock and the trigger lines into one local clock domain.
//
// The board latches L1A, L2A and B0 with the CDF clock (132 ns). The local clock
// (12 ns or 22 ns) comes from a PLL locked to the delayed CDF clock, so each CDF
// period holds a whole number of local periods. The CDF clock passes through two
// flip-flops; its rising edge gives tick, one local cycle wide, once per CDF period.
// The trigger lines are steady for the whole CDF period, so they are sampled on that
// tick and come out as one-cycle pulses l1a_p, l2a_p and b0_p. phase counts local
// cycles since the last tick. Latency: two to three local cycles after the CDF edge.
// The synchroniser and the pulse outputs are this design's choices.
module cdf_sync (
  input  logic       clk,
  input  logic       rst,
  input  logic       cdf_clk,
  input  logic       l1a,
  input  logic       l2a,
  input  logic       b0,
  output logic       tick,
  output logic       l1a_p,
  output logic       l2a_p,
  output logic       b0_p,
  output logic [3:0] phase
);
  logic [2:0] s;

  always_ff @(posedge clk) begin
    if (rst) begin
      s <= '0;
      tick <= 1'b0; l1a_p <= 1'b0; l2a_p <= 1'b0; b0_p <= 1'b0;
      phase <= '0;
    end else begin
      s     <= {s[1:0], cdf_clk};
      tick  <= s[1] && !s[2];
      l1a_p <= s[1] && !s[2] && l1a;
      l2a_p <= s[1] && !s[2] && l2a;
      b0_p  <= s[1] && !s[2] && b0;
      phase <= (s[1] && !s[2]) ? 4'd0 : phase + 4'd1;
    end
  end
endmodule
