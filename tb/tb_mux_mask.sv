// tb_mux_mask: random SERDES and test data, random select and mask; each output wire
// must be the selected source one clock later, or zero when masked.
module tb_mux_mask;
  localparam int N = 48, SER = 10;
  logic clk = 0, sel_test = 0;
  logic [N-1:0] mask = '0;
  logic [N*SER-1:0] serdes_d, test_d, dout, exp_d;
  int checks = 0, failures = 0;

  mux_mask #(.N(N), .SER(SER)) dut (.clk, .sel_test, .mask, .serdes_d, .test_d, .dout);
  always #6ns clk = ~clk;

  initial begin
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int i = 0; i < N * SER; i += 32) begin
        serdes_d[i +: 32] = $urandom;
        test_d[i +: 32]   = $urandom;
      end
      sel_test = 1'($urandom);
      mask = {16'($urandom), 32'($urandom)};
      for (int i = 0; i < N; i++)
        exp_d[i*SER +: SER] = mask[i] ? '0 : sel_test ? test_d[i*SER +: SER] : serdes_d[i*SER +: SER];
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (dout[i*SER +: SER] !== exp_d[i*SER +: SER]) begin
          failures++; $display("t=%0d wire %0d mismatch", t, i);
        end
      end
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
