// tb_ctrl_vme: Control FPGA registers: constants, power-up values of the
// bunch count shift, ignore-aborts, word count max and timer delay, writes,
// the state register bit packing, IDPROM reads, word count registers and the
// output DAQ RAM window.
`include "tb/tb_util.svh"
module tb_ctrl_vme;
  import xft_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `WATCHDOG(5000)
  vme_req_t req; logic [31:0] rdata; logic rvalid, soft_reset, ignore_abort;
  logic [7:0] bc_shift; logic [9:0] wc_max; logic [19:0] num_ticks;
  logic [9:0] cur_wc; logic [9:0] wc_reg [4]; logic [3:0] timer_en; logic [1:0] event_cnt;
  logic ge_max, overflow; logic [10:0] ram_raddr; logic [31:0] ram_rdata; logic [9:0] ram_wc [4];
  logic [4:0] idprom_addr; logic [7:0] idprom_data;
  ctrl_vme dut (.clk, .rst, .req, .rdata, .rvalid, .soft_reset, .bc_shift, .ignore_abort,
    .wc_max, .num_ticks, .cur_wc, .wc_reg, .timer_en, .event_cnt, .ge_max, .overflow,
    .ram_raddr, .ram_rdata, .ram_wc, .idprom_addr, .idprom_data);
  always_ff @(posedge clk) ram_rdata <= {21'h1ABCD, ram_raddr};
  assign idprom_data = 8'(idprom_addr) ^ 8'hA5;

  task automatic rd(input logic [23:0] a, output logic [31:0] d);
    @(negedge clk); req = '0; req.addr = a; req.rd = 1;
    @(negedge clk); req = '0;
    `CHK(rvalid, "rvalid");
    d = rdata;
  endtask
  task automatic wr(input logic [23:0] a, input logic [31:0] d);
    @(negedge clk); req = '0; req.addr = a; req.wr = 1; req.wdata = d;
    @(negedge clk); req = '0;
  endtask

  logic [31:0] d;
  initial begin
    req = '0; cur_wc = 10'd5; wc_reg = '{10'd11, 10'd22, 10'd33, 10'd44};
    timer_en = 4'b1010; event_cnt = 2'd3; ge_max = 1; overflow = 0;
    ram_wc = '{10'd1, 10'd2, 10'd3, 10'd512};
    repeat (3) @(posedge clk); #1 rst = 0;
    rd(24'h000000, d); `CHK(d == 32'h0C710090, "firmware version");
    rd(24'h00000C, d); `CHK(d == 32'd41 && bc_shift == 8'd41, "bunch count shift power-up");
    rd(24'h000018, d); `CHK(d == 32'd1 && ignore_abort, "ignore aborts power-up");
    rd(24'h00001C, d); `CHK(d == {2'b0, 10'd1023, 20'd16} && wc_max == 1023 && num_ticks == 16, "control 3 power-up");
    rd(24'h000010, d); `CHK(d == 32'h00C0FFEE, "status 1");
    rd(24'h000020, d); `CHK(d == 32'hDEADBEEF, "status 2");
    wr(24'h00001C, {2'b0, 10'd10, 20'd400});
    `CHK(wc_max == 10 && num_ticks == 400, "control 3 write");
    wr(24'h000018, 0); `CHK(!ignore_abort, "ignore aborts write");
    wr(24'h00000C, 7); `CHK(bc_shift == 7, "shift write");
    rd(24'h000024, d); `CHK(d == {2'b0, 10'd22, 10'd11, 10'd5}, "state register 1");
    rd(24'h000028, d); `CHK(d == {4'b0, 4'b1010, 2'd3, 1'b1, 1'b0, 10'd44, 10'd33}, "state register 2");
    for (int i = 0; i < 32; i += 7) begin
      rd(24'h100000 + 24'(i * 4), d); `CHK(d == {8'(i) ^ 8'hA5, 24'b0}, "IDPROM byte");
    end
    rd(24'h000B00, d); `CHK(d == 32'd512, "word count register buffer 3");
    rd(24'h000904, d); `CHK(d == 0, "DAQ RAM 2 word count");
    rd(24'h800000 | (24'd2 << 20) | (24'd300 << 2), d); `CHK(d == {21'h1ABCD, 2'd2, 9'd300}, "DAQ RAM window");
    rd(24'h820000, d); `CHK(d == 0, "DAQ RAM 2 reads zero");
    `FINISH
  end
endmodule
