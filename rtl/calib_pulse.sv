// calib_pulse: source of the front-panel ECL calibration pulse.
//
// After each B0 (bunch-zero marker) the local generator waits a VME-programmed
// number of 12 ns cycles (dly) and then gives one 12 ns pulse. A VME-controlled
// select chooses between this local pulse and the calibration pulse arriving from
// the backplane. Both the 12 ns width and the VME-controlled delay and selection come
// from the document (a feature planned for the pre-production board in TDC chip 0);
// the counter that makes the delay is this design's own. The output is registered.
module calib_pulse (
  input  logic       clk,
  input  logic       rst,
  input  logic       b0,        // one-cycle B0 marker in the 12 ns domain
  input  logic [7:0] dly,       // delay after B0 in 12 ns units
  input  logic       sel_local, // 1: local pulse, 0: backplane pulse
  input  logic       bp_pulse,  // calibration pulse from the backplane
  output logic       cal_out
);
  logic [7:0] cnt;
  logic       run;
  logic       local_p;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; run <= 1'b0; local_p <= 1'b0;
    end else begin
      local_p <= 1'b0;
      if (b0) begin
        run <= (dly != 0);
        cnt <= dly;
        local_p <= (dly == 0);
      end else if (run) begin
        cnt <= cnt - 1'b1;
        if (cnt == 8'd1) begin
          run     <= 1'b0;
          local_p <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) cal_out <= sel_local ? local_p : bp_pulse;
endmodule
