// tb_latency_meter: the tick advances exactly once every TICK_CYCLES clocks.
`include "tb/tb_util.svh"
module tb_latency_meter;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `WATCHDOG(10000)
  logic [15:0] tick;
  latency_meter dut (.clk, .rst, .tick);
  initial begin
    @(posedge clk); #1 rst = 0;
    for (int n = 1; n <= 200; n++) begin
      @(posedge clk); #1;
      `CHK(tick == 16'(n / 8), "tick = cycles / 8");
    end
    `FINISH
  end
endmodule
