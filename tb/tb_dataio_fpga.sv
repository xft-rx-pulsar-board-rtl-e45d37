// tb_dataio_fpga: a whole DataIO FPGA. Six Finder channels send packets of
// different lengths after an L1A; the link to the Control FPGA must carry
// each channel's 32-bit words in channel order, the last word twice with
// Data EOE, and the two word count words with the right counts. Then one
// channel is disabled over VME (followed by a VME reset, as the board
// requires) and a second event checked; the input DAQ RAM is read over VME.
`include "tb/tb_util.svh"
module tb_dataio_fpga;
  import xft_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `WATCHDOG(20000)
  logic [15:0] fin_data [6]; logic [5:0] fin_strobe; logic l1a; logic [1:0] l1a_buf;
  vme_req_t vme_req; logic [31:0] vme_rdata; logic vme_rvalid; dio_link_t link;
  dataio_fpga dut (.clk, .rst, .fin_data, .fin_strobe, .l1a, .l1a_buf, .vme_req, .vme_rdata,
    .vme_rvalid, .link);

  logic [31:0] exp_w [$];
  logic [6:0] cnt [6];
  dio_link_t got [$];
  always @(posedge clk) if (!rst && (link.strobe || link.wc_strobe0 || link.wc_strobe1)) got.push_back(link);

  task automatic build(input int c, input int n, output logic [15:0] h [$]);
    h.delete();
    h.push_back(16'h8000 | 16'(c));
    for (int i = 1; i <= n; i++) h.push_back(16'(c * 256 + i));
    h.push_back(16'hC000 | 16'(c));
  endtask

  task automatic run_event(input logic [1:0] b, input logic [5:0] en, input int base);
    logic [15:0] h [6][$];
    exp_w.delete(); got.delete();
    @(negedge clk); l1a = 1; l1a_buf = b; @(negedge clk); l1a = 0;
    for (int c = 0; c < 6; c++) begin
      build(c, base + 3 * c, h[c]);
      cnt[c] = 7'((h[c].size() + 1) / 2);
      if (en[c])
        for (int i = 0; i < h[c].size(); i += 2)
          exp_w.push_back(i + 1 < h[c].size() ? {h[c][i+1], h[c][i]} : {h[c][i], h[c][i]});
    end
    // all six Finders send in parallel
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      for (int c = 0; c < 6; c++) begin
        fin_strobe[c] = (i < h[c].size());
        fin_data[c] = (i < h[c].size()) ? h[c][i] : 16'h0;
      end
    end
    @(negedge clk); fin_strobe = 0;
    repeat (200) @(negedge clk);
    `CHK(got.size() == exp_w.size() + 3, "link word count");
    if (got.size() == exp_w.size() + 3) begin
      foreach (exp_w[i]) begin
        `CHK(got[i].strobe && got[i].data == exp_w[i], "link data word");
        `CHK(got[i].eoe == (i == exp_w.size() - 1), "data eoe");
      end
      `CHK(got[exp_w.size()].eoe && got[exp_w.size()].data == exp_w[$], "EOE repeat");
      for (int c = 0; c < 6; c++) if (!en[c]) cnt[c] = 0;
      `CHK(got[exp_w.size()+1].wc_strobe0 &&
           got[exp_w.size()+1].data == {2'b0, cnt[3], cnt[2], 2'b0, cnt[1], cnt[0]}, "wc word 1");
      `CHK(got[exp_w.size()+2].wc_strobe1 &&
           got[exp_w.size()+2].data == {18'b0, cnt[5], cnt[4]}, "wc word 2");
    end
  endtask

  task automatic vme(input logic [23:0] a, input logic w, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk); vme_req = '0; vme_req.addr = a; vme_req.wr = w; vme_req.rd = !w; vme_req.wdata = d;
    @(negedge clk); vme_req = '0; q = vme_rdata;
  endtask

  logic [31:0] q;
  initial begin
    fin_strobe = 0; l1a = 0; l1a_buf = 0; vme_req = '0;
    for (int c = 0; c < 6; c++) fin_data[c] = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    run_event(2'd0, 6'h3F, 2);
    vme(24'h08000C, 1, 32'b110111, q);
    vme(24'h080004, 1, 32'h1, q);
    run_event(2'd3, 6'b110111, 5);
    // channel 5 (index 4) has 5+12 data words: first stored word of buffer 3
    vme({4'b1011, 2'b10, 6'b0, 3'd4, 7'd0, 2'b0}, 0, 0, q);
    `CHK(q == {16'(4 * 256 + 1), 16'h8004}, "input DAQ RAM over VME");
    vme(24'h080B00, 0, 0, q);
    // 32-bit words per channel: ceil((5 + 3c + 2) / 2) = 4, 5, 7, 8, 10, 11
    `CHK(q == 32'd45, "word count register of buffer 3");
    `FINISH
  end
endmodule
