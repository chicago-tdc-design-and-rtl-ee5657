// tb_cdf_sync: a 132 ns CDF clock with random L1A, L2A and B0 levels held for a CDF
// period; the 12 ns side must give exactly one tick per CDF period, pulses that copy
// the trigger levels, a phase counter that returns to 0 on the tick, and a tick
// 2 to 3 clocks after the CDF edge.
module tb_cdf_sync;
  logic clk = 0, rst = 1, cdf_clk = 0, l1a = 0, l2a = 0, b0 = 0;
  logic tick, l1a_p, l2a_p, b0_p;
  logic [3:0] phase;
  int checks = 0, failures = 0;
  int ticks = 0, ncdf = 0, n_l1 = 0, n_l2 = 0, n_b0 = 0, e_l1 = 0, e_l2 = 0, e_b0 = 0;
  time t_edge;

  cdf_sync dut (.clk, .rst, .cdf_clk, .l1a, .l2a, .b0, .tick, .l1a_p, .l2a_p, .b0_p, .phase);
  always #6ns clk = ~clk;

  // CDF clock: rises 3 ns after a 12 ns edge, period 132 ns; triggers change with it
  initial begin
    #3ns;
    forever begin
      cdf_clk = 1; t_edge = $time; ncdf++;
      l1a = 1'($urandom); l2a = 1'($urandom); b0 = 1'($urandom);
      if (ncdf > 2) begin e_l1 += l1a; e_l2 += l2a; e_b0 += b0; end
      #66ns cdf_clk = 0;
      #66ns;
    end
  end

  always @(posedge clk) if (!rst && tick && $time > 300ns) begin
    ticks++;
    checks++;
    if (($time - t_edge) < 24ns || ($time - t_edge) > 40ns) begin
      failures++; $display("tick %0t ps after CDF edge", $time - t_edge);
    end
    checks++;
    if (phase != 4'd0) begin failures++; $display("phase %0d at tick", phase); end
    n_l1 += l1a_p; n_l2 += l2a_p; n_b0 += b0_p;
    checks++;
    if (l1a_p !== l1a || l2a_p !== l2a || b0_p !== b0) begin failures++; $display("trigger mismatch"); end
  end
  always @(posedge clk) if (!rst && !tick && (l1a_p || l2a_p || b0_p)) begin
    failures++; $display("pulse outside tick");
  end

  initial begin
    #50ns rst = 0;
    #20us;
    checks++;
    if (ticks < ncdf - 2 || ticks > ncdf) begin failures++; $display("ticks %0d cdf %0d", ticks, ncdf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
