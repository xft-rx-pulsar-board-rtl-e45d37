// tb_sync_fifo: random push/pop against a queue model; checks head data,
// empty, full and usedw, and that writes to a full FIFO are ignored.
`include "tb/tb_util.svh"
module tb_sync_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `WATCHDOG(20000)
  logic wr, rd; logic [15:0] wd, q; logic empty, full; logic [3:0] used;
  sync_fifo #(.WIDTH(16), .DEPTH(8)) dut (.clk, .rst, .wr_en(wr), .wr_data(wd),
    .rd_en(rd), .rd_data(q), .empty, .full, .usedw(used));
  logic [15:0] model [$];
  int fulls = 0;
  initial begin
    wr = 0; rd = 0; wd = 0;
    repeat (3) @(posedge clk); rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      `CHK(used == model.size(), "usedw");
      `CHK(empty == (model.size() == 0), "empty");
      `CHK(full == (model.size() == 8), "full");
      if (model.size() > 0) `CHK(q == model[0], "head data");
      if (full) fulls++;
      wr = ($urandom % 100) < (i < 1500 ? 70 : 30);
      rd = ($urandom % 100) < (i < 1500 ? 30 : 70);
      wd = 16'($urandom);
      @(posedge clk); #1;
      begin
        automatic int n = model.size();
        if (rd && n > 0) void'(model.pop_front());
        if (wr && n < 8) model.push_back(wd);
      end
    end
    `CHK(fulls > 0, "reached full");
    `FINISH
  end
endmodule
