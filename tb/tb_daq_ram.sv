// tb_daq_ram: writes random words to every address, reads them back with the
// one-cycle read latency and checks them.
`include "tb/tb_util.svh"
module tb_daq_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `WATCHDOG(10000)
  logic we; logic [8:0] wa, ra; logic [31:0] wd, rd;
  logic [31:0] model [512];
  daq_ram #(.WIDTH(32), .DEPTH(512)) dut (.clk, .we, .waddr(wa), .wdata(wd), .raddr(ra), .rdata(rd));
  initial begin
    we = 0; wa = 0; ra = 0; wd = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); we = 1; wa = 9'(i); wd = $urandom; model[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); ra = 9'(511 - i);
      @(posedge clk); #1;
      `CHK(rd == model[511 - i], "read back");
    end
    `FINISH
  end
endmodule
