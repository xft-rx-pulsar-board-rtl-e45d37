// tb_bunch_counter: the counter loads the shift value on the bunch-zero
// marker and counts bunch crossings; each L1A queues count, buffer and time
// stamp in order.
`include "tb/tb_util.svh"
module tb_bunch_counter;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `WATCHDOG(5000)
  logic bc_strobe, b0_marker, l1a, rd, empty; logic [7:0] bc_shift, ev_bc, count;
  logic [1:0] l1a_buf, ev_buf; logic [15:0] tick, ev_tick;
  bunch_counter dut (.clk, .rst, .bc_strobe, .b0_marker, .bc_shift, .l1a, .l1a_buf, .tick,
    .rd, .empty, .ev_bc, .ev_buf, .ev_tick, .count);
  int model;
  logic [25:0] q [$];
  initial begin
    bc_strobe = 0; b0_marker = 0; bc_shift = 41; l1a = 0; l1a_buf = 0; rd = 0; tick = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    @(negedge clk); b0_marker = 1; @(negedge clk); b0_marker = 0; model = 41;
    `CHK(count == 41, "shift loaded on bunch zero");
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      bc_strobe = (i % 4 == 0);
      l1a = (i % 37 == 5); l1a_buf = 2'(i / 37); tick = 16'(i * 3);
      if (l1a) q.push_back({tick, l1a_buf, 8'(model)});
      @(posedge clk); #1;
      if (bc_strobe) model++;
      `CHK(count == 8'(model), "counts crossings");
    end
    @(negedge clk); bc_strobe = 0; l1a = 0;
    foreach (q[i]) begin
      `CHK(!empty && {ev_tick, ev_buf, ev_bc} == q[i], "latched at L1A");
      rd = 1; @(negedge clk); rd = 0;
    end
    `CHK(empty, "all events read");
    `FINISH
  end
endmodule
