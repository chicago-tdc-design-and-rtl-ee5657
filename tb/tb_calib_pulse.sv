// tb_calib_pulse: B0 markers with random delays; with the local source selected the
// output must be a single 12 ns pulse exactly dly+2 clocks after the B0 marker; with
// the backplane selected it must follow cal_bp one clock later.
module tb_calib_pulse;
  logic clk = 0, rst = 1, b0 = 0, sel_local = 1, bp_pulse = 0, cal_out;
  logic [7:0] dly = 0;
  int checks = 0, failures = 0;

  calib_pulse dut (.clk, .rst, .b0, .dly, .sel_local, .bp_pulse, .cal_out);
  always #6ns clk = ~clk;

  initial begin
    @(negedge clk); rst = 0;
    for (int n = 0; n < 30; n++) begin
      automatic int d = (n < 3) ? n : int'($urandom % 40);
      automatic int seen_at = -1;
      automatic int count = 0;
      dly = 8'(d);
      @(negedge clk); b0 = 1;
      @(negedge clk); b0 = 0;
      for (int c = 1; c < d + 10; c++) begin
        if (cal_out) begin count++; if (seen_at < 0) seen_at = c; end
        @(negedge clk);
      end
      checks++;
      if (count != 1 || seen_at != d + 2) begin
        failures++; $display("dly=%0d pulse at %0d count %0d", d, seen_at, count);
      end
    end
    sel_local = 0;
    for (int t = 0; t < 100; t++) begin
      automatic logic v = 1'($urandom);
      @(negedge clk); bp_pulse = v;
      @(negedge clk);
      checks++;
      if (cal_out !== v) begin failures++; $display("backplane pulse not passed"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
