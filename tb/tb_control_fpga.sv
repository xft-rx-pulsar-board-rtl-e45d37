// tb_control_fpga: drives both DataIO links with events in the link format
// (data, EOE word repeated, two word count words), an abort decision per
// event over TS_IN, and checks the S-LINK packets: normal event with data of
// both FPGAs and three merged count words, an aborted event (single
// 0xC000C000 word and abort flag), and with a low word count max, a
// truncated event (data cut, truncation flag).
`include "tb/tb_util.svh"
module tb_control_fpga;
  import xft_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `WATCHDOG(30000)
  dio_link_t link1, link2; logic l1a, bc_strobe, b0_marker; logic [1:0] l1a_buf;
  logic bp_abort_n, bp_strobe_n, ts_abort, ts_strobe; vme_req_t vme_req;
  logic [31:0] vme_rdata; logic vme_rvalid; logic [4:0] idprom_addr; slink_t slink1, slink2;
  control_fpga dut (.clk, .rst, .link1, .link2, .l1a, .l1a_buf, .bc_strobe, .b0_marker,
    .bp_abort_n, .bp_strobe_n, .ts_abort, .ts_strobe, .vme_req, .vme_rdata, .vme_rvalid,
    .idprom_addr, .idprom_data(8'h00), .slink1, .slink2);

  slink_t got [$];
  always @(posedge clk) if (!rst && slink1.write) got.push_back(slink1);

  task automatic vme_wr(input logic [23:0] a, input logic [31:0] d);
    @(negedge clk); vme_req = '0; vme_req.addr = a; vme_req.wr = 1; vme_req.wdata = d;
    @(negedge clk); vme_req = '0;
  endtask

  task automatic send_link(input int which, input int n, input int tag);
    dio_link_t l;
    for (int i = 0; i < n + 3; i++) begin
      l = '0;
      if (i < n) begin l.strobe = 1; l.data = 32'(tag * 100 + i); l.eoe = (i == n - 1); end
      else if (i == n) begin l.strobe = 1; l.data = 32'(tag * 100 + n - 1); l.eoe = 1; end
      else if (i == n + 1) begin l.wc_strobe0 = 1; l.data = 32'(tag * 10 + 1); end
      else begin l.wc_strobe1 = 1; l.data = 32'(tag * 10 + 2); end
      @(negedge clk);
      if (which == 1) link1 = l; else link2 = l;
    end
    @(negedge clk); if (which == 1) link1 = '0; else link2 = '0;
  endtask

  // one event: L1A, abort decision, both links
  task automatic run(input int n1, input int n2, input logic ab, output logic [15:0] flags,
                     output int ndata, output logic is_abort_word);
    int t1 = 1, t2 = 2;
    got.delete();
    @(negedge clk); l1a = 1; l1a_buf = 2'd1; @(negedge clk); l1a = 0;
    ts_abort = ab; #25 ts_strobe = 1; #25 ts_strobe = 0; ts_abort = 0;
    fork send_link(1, n1, t1); send_link(2, n2, t2); join
    repeat (120) @(negedge clk);
    `CHK(got.size() >= 6, "packet received");
    flags = 0; ndata = 0; is_abort_word = 0;
    if (got.size() >= 6) begin
      `CHK(got[0].data == SLINK_BOF && got[0].control, "BOF");
      `CHK(got[1].data[1:0] == 2'd1, "buffer number in header 1");
      `CHK(got[$].data == SLINK_EOF && got[$].control, "EOF");
      flags = got[$-1].data[15:0];
      `CHK(got[$-1].data[31:16] == 16'(got.size() - 5), "trailer data size");
      ndata = got.size() - 5;
      is_abort_word = (got[3].data == ABORT_WORD);
    end
  endtask

  logic [15:0] flags; int nd; logic aw;
  initial begin
    link1 = '0; link2 = '0; l1a = 0; l1a_buf = 0; bc_strobe = 0; b0_marker = 0;
    bp_abort_n = 1; bp_strobe_n = 1; ts_abort = 0; ts_strobe = 0; vme_req = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    vme_wr(24'h000018, 0);               // honour aborts
    run(4, 3, 0, flags, nd, aw);
    `CHK(nd == 4 + 3 + 3 && flags == 0 && !aw, "normal event");
    `CHK(got[3].data == 100 && got[7].data == 200, "DataIO 1 then DataIO 2 data");
    `CHK(got[11].data == {16'd21, 16'd12}, "merged word count word 2");
    run(5, 5, 1, flags, nd, aw);
    `CHK(nd == 1 && aw && flags == 16'b001, "aborted event");
    vme_wr(24'h00001C, {2'b0, 10'd6, 20'd2000});
    run(6, 6, 0, flags, nd, aw);
    `CHK(nd == 8 + 3 && flags == 16'b010, "truncated event: 8 data words and flag");
    vme_wr(24'h000018, 1);               // ignore aborts
    vme_wr(24'h00001C, {2'b0, 10'd1023, 20'd16});
    repeat (2100) @(negedge clk);
    run(2, 2, 1, flags, nd, aw);
    `CHK(nd == 7 && flags == 16'b100, $sformatf("abort ignored, flag bit 2 (%0d words, flags %b)", nd, flags));
    `FINISH
  end
endmodule
