// tb_dataio_vme: register reads (constants and power-up values), writes of
// the R/W registers, the soft reset pulse, word count register sums and the
// DAQ RAM window decode (buffer, channel, word, RAM 2 reading zero).
`include "tb/tb_util.svh"
module tb_dataio_vme;
  import xft_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `WATCHDOG(5000)
  vme_req_t req; logic [31:0] rdata; logic rvalid, soft_reset; logic [5:0] chan_en;
  logic [8:0] ram_raddr; logic [31:0] ram_rdata [6]; logic [6:0] wc [6][4];
  dataio_vme dut (.clk, .rst, .req, .rdata, .rvalid, .soft_reset, .chan_en, .ram_raddr,
    .ram_rdata, .wc);
  // fake RAMs: data = {channel, address}, registered like the real RAM
  always_ff @(posedge clk) for (int c = 0; c < 6; c++) ram_rdata[c] <= {8'hC0 + 8'(c), 15'b0, ram_raddr};

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

  logic [31:0] d; int pulses;
  always @(posedge clk) if (soft_reset) pulses++;
  initial begin
    req = '0; pulses = 0;
    for (int c = 0; c < 6; c++) for (int b = 0; b < 4; b++) wc[c][b] = 7'(c + 10 * b);
    repeat (3) @(posedge clk); #1 rst = 0;
    rd(24'h080000, d); `CHK(d == 32'h0D705140, "firmware version");
    rd(24'h08000C, d); `CHK(d == 32'h3F, "channel enable power-up");
    `CHK(chan_en == 6'h3F, "channel enable output");
    rd(24'h080010, d); `CHK(d == 32'h00C0FFEE, "status 1");
    rd(24'h080020, d); `CHK(d == 32'h00000CDF, "status 2");
    wr(24'h08000C, 32'h15); rd(24'h08000C, d); `CHK(d == 32'h15 && chan_en == 6'h15, "channel enable write");
    wr(24'h080008, 32'h12345678); rd(24'h080008, d); `CHK(d == 32'h12345678, "DAQ SW version");
    wr(24'h08001C, 32'hCAFE); rd(24'h08001C, d); `CHK(d == 32'hCAFE, "control 3");
    wr(24'h080004, 32'h1); `CHK(pulses == 1, "one soft reset pulse");
    rd(24'h08000C, d); `CHK(d == 32'h15, "soft reset keeps registers");
    for (int b = 0; b < 4; b++) begin
      rd(24'h080800 + 24'(b) * 24'h100, d); `CHK(d == 32'(15 + 60 * b), "word count register sum");
      rd(24'h080804 + 24'(b) * 24'h100, d); `CHK(d == 0, "DAQ RAM 2 word count");
    end
    // DAQ RAM 1, buffer 3, channel 4, word 5
    rd(24'h800000 | (24'd3 << 20) | (24'd4 << 9) | (24'd5 << 2), d);
    `CHK(d == {8'hC4, 15'b0, 2'd3, 7'd5}, "DAQ RAM window");
    rd(24'h800000 | (24'd1 << 20) | (24'd0 << 9) | (24'd127 << 2), d);
    `CHK(d == {8'hC0, 15'b0, 2'd1, 7'd127}, "DAQ RAM window ch0");
    rd(24'h820000 | (24'd1 << 20), d); `CHK(d == 0, "DAQ RAM 2 reads zero");
    `FINISH
  end
endmodule
