// tb_xftdaq: sends Finder packets of odd and even length after L1As to
// different buffers; checks the 32-bit packing, end-of-event flag, the copy
// in the input DAQ RAM, the per-buffer word counts, the two latency words at
// the end of the buffer, and that a full output FIFO stalls without loss.
`include "tb/tb_util.svh"
module tb_xftdaq;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `WATCHDOG(50000)
  logic [15:0] fin_data; logic fin_strobe, l1a; logic [1:0] l1a_buf;
  logic [15:0] tick;
  logic ofifo_rd; logic [31:0] ofifo_data; logic ofifo_eoe, ofifo_empty; logic [4:0] used;
  logic [8:0] ram_raddr; logic [31:0] ram_rdata; logic [6:0] wc [4];
  latency_meter lat (.clk, .rst, .tick);
  xftdaq #(.OFIFO_DEPTH(16)) dut (.clk, .rst, .fin_data, .fin_strobe, .l1a, .l1a_buf, .tick,
    .ofifo_rd, .ofifo_data, .ofifo_eoe, .ofifo_empty, .ofifo_usedw(used),
    .ram_raddr, .ram_rdata, .wc);

  task automatic send(input int ndata, input logic [7:0] tag);
    logic [15:0] w;
    for (int i = 0; i < ndata + 2; i++) begin
      @(negedge clk);
      if (i == 0) w = {2'b10, 6'h0, tag};
      else if (i == ndata + 1) w = {2'b11, 6'h0, tag};
      else w = {1'b0, 15'(tag * 100 + i)};
      fin_data = w; fin_strobe = 1;
      @(negedge clk); fin_strobe = 0;
    end
  endtask

  // expected 32-bit words for a packet
  function automatic void expect_words(input int ndata, input logic [7:0] tag,
                                       ref logic [31:0] q[$]);
    logic [15:0] h [$];
    h.push_back({2'b10, 6'h0, tag});
    for (int i = 1; i <= ndata; i++) h.push_back({1'b0, 15'(tag * 100 + i)});
    h.push_back({2'b11, 6'h0, tag});
    q.delete();
    for (int i = 0; i < h.size(); i += 2)
      q.push_back(i + 1 < h.size() ? {h[i+1], h[i]} : {h[i], h[i]});
  endfunction

  task automatic drain_check(input int ndata, input logic [7:0] tag, input logic [1:0] b);
    logic [31:0] q [$];
    expect_words(ndata, tag, q);
    foreach (q[i]) begin
      while (ofifo_empty) @(negedge clk);
      `CHK(ofifo_data == q[i], "packed word");
      `CHK(ofifo_eoe == (i == q.size() - 1), "eoe flag");
      ofifo_rd = 1; @(negedge clk); ofifo_rd = 0;
    end
    repeat (4) @(negedge clk);
    `CHK(wc[b] == 7'(q.size()), "word count");
    foreach (q[i]) begin
      ram_raddr = {b, 7'(i)}; @(negedge clk);
      `CHK(ram_rdata == q[i], "DAQ RAM word");
    end
  endtask

  int t_l1a;
  initial begin
    fin_data = 0; fin_strobe = 0; l1a = 0; l1a_buf = 0; ofifo_rd = 0; ram_raddr = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    // event 1: buffer 2, 5 data words (7 halves, odd), first word 80 cycles after L1A
    @(negedge clk); l1a = 1; l1a_buf = 2; @(negedge clk); l1a = 0;
    repeat (79) @(negedge clk);
    send(5, 8'h11);
    drain_check(5, 8'h11, 2);
    ram_raddr = {2'd2, 7'd126}; @(negedge clk);
    `CHK(ram_rdata[15:0] inside {16'd9, 16'd10, 16'd11}, "BOE latency ~10 ticks");
    `CHK(ram_rdata[31:16] == 0, "latency word upper half");
    ram_raddr = {2'd2, 7'd127}; @(negedge clk);
    `CHK(ram_rdata[15:0] inside {[16'd11:16'd13]}, "EOE latency ~12 ticks");
    // event 2: buffer 1, 6 data words (even), but the output FIFO (16) must
    // stall: 20 data words -> 11 32-bit words; send 40 -> 21 words > 16
    @(negedge clk); l1a = 1; l1a_buf = 1; @(negedge clk); l1a = 0;
    fork send(40, 8'h22); join_none
    repeat (300) @(negedge clk);
    `CHK(used == 5'd16, "output FIFO filled and stalled");
    drain_check(40, 8'h22, 1);
    // event 3: buffer 0, empty packet (header+trailer only)
    @(negedge clk); l1a = 1; l1a_buf = 0; @(negedge clk); l1a = 0;
    send(0, 8'h33);
    drain_check(0, 8'h33, 0);
    `CHK(wc[2] == 7'd4, "buffer 2 count kept");
    `FINISH
  end
endmodule
