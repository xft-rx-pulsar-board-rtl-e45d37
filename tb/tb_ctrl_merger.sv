// tb_ctrl_merger: loads both input FIFOs with DataIO packets (EOE word
// repeated), queues word count words and abort decisions, and checks the
// merged stream: DataIO 1 data, DataIO 2 data (each EOE word once) on the
// data strobe, then the three word count words on the control strobe with
// the last one marked; an aborted event gives only 0xC000C000 and its data
// are discarded; with aborts ignored the abort decision has no effect.
`include "tb/tb_util.svh"
module tb_ctrl_merger;
  import xft_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `WATCHDOG(20000)
  logic ignore_abort, ab_wr, ab_in, ab_empty, ab_event, ab_rd;
  logic w1, w2, f1_empty, f2_empty, f1_rd, f2_rd; logic [32:0] d1, d2, f1_q, f2_q;
  logic wc_empty, wc_rd; logic [31:0] wc_words [3];
  logic [31:0] out_data; logic data_strobe, ctl_strobe, out_last, fod_eoe, fod_abort, clear_ovf;
  logic fu1, fu2, fu3; logic [4:0] u1, u2, u3;
  sync_fifo #(.WIDTH(1), .DEPTH(16)) fa (.clk, .rst, .wr_en(ab_wr), .wr_data(ab_in), .rd_en(ab_rd),
    .rd_data(ab_event), .empty(ab_empty), .full(fu3), .usedw(u3));
  sync_fifo #(.WIDTH(33), .DEPTH(16)) fi1 (.clk, .rst, .wr_en(w1), .wr_data(d1), .rd_en(f1_rd),
    .rd_data(f1_q), .empty(f1_empty), .full(fu1), .usedw(u1));
  sync_fifo #(.WIDTH(33), .DEPTH(16)) fi2 (.clk, .rst, .wr_en(w2), .wr_data(d2), .rd_en(f2_rd),
    .rd_data(f2_q), .empty(f2_empty), .full(fu2), .usedw(u2));
  ctrl_merger dut (.clk, .rst, .ignore_abort, .ab_empty, .ab_event, .ab_rd,
    .f1_empty, .f1_q, .f1_rd, .f2_empty, .f2_q, .f2_rd, .wc_empty, .wc_words, .wc_rd,
    .out_data, .data_strobe, .ctl_strobe, .out_last, .fod_eoe, .fod_abort, .clear_ovf);

  logic [34:0] got [$];   // {data_strobe, ctl_strobe, last, data}
  int eoes, eoe_aborts;
  always @(posedge clk) if (!rst) begin
    if (data_strobe || ctl_strobe) got.push_back({data_strobe, ctl_strobe, out_last, out_data});
    if (fod_eoe) begin eoes++; if (fod_abort) eoe_aborts++; end
  end

  task automatic load(input int n1, input int n2, input int tag);
    for (int i = 0; i < n1; i++) begin @(negedge clk); w1 = 1; d1 = {i == n1 - 1, 32'(tag * 1000 + i)}; end
    @(negedge clk); w1 = 1;   // repeated EOE word
    @(negedge clk); w1 = 0;
    for (int i = 0; i < n2; i++) begin @(negedge clk); w2 = 1; d2 = {i == n2 - 1, 32'(tag * 1000 + 500 + i)}; end
    @(negedge clk); w2 = 1;
    @(negedge clk); w2 = 0;
  endtask

  task automatic check_event(input int n1, input int n2, input int tag, input logic aborted);
    repeat (60) @(negedge clk);
    if (aborted) begin
      `CHK(got.size() == 1, "aborted: one word");
      if (got.size() > 0) `CHK(got[0] == {1'b0, 1'b1, 1'b1, ABORT_WORD}, "abort word");
    end else begin
      `CHK(got.size() == n1 + n2 + 3, "word count of event");
      if (got.size() == n1 + n2 + 3) begin
        for (int i = 0; i < n1; i++) `CHK(got[i] == {3'b100, 32'(tag * 1000 + i)}, "DataIO 1 word");
        for (int i = 0; i < n2; i++) `CHK(got[n1 + i] == {3'b100, 32'(tag * 1000 + 500 + i)}, "DataIO 2 word");
        for (int k = 0; k < 3; k++)
          `CHK(got[n1 + n2 + k] == {2'b01, k == 2, 32'(tag * 10 + k)}, "word count word");
      end
    end
    got.delete();
  endtask

  task automatic abort_bit(input logic v);
    @(negedge clk); ab_wr = 1; ab_in = v; @(negedge clk); ab_wr = 0;
  endtask

  initial begin
    ignore_abort = 0; ab_wr = 0; ab_in = 0; w1 = 0; w2 = 0; d1 = 0; d2 = 0; wc_empty = 1;
    eoes = 0; eoe_aborts = 0;
    for (int k = 0; k < 3; k++) wc_words[k] = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    // event 1: not aborted
    abort_bit(0); load(3, 2, 1);
    for (int k = 0; k < 3; k++) wc_words[k] = 32'(10 + k);
    wc_empty = 0; wait (wc_rd); @(negedge clk); wc_empty = 1;
    check_event(3, 2, 1, 0);
    // event 2: aborted
    abort_bit(1); load(4, 1, 2);
    for (int k = 0; k < 3; k++) wc_words[k] = 32'(20 + k);
    wc_empty = 0; wait (wc_rd); @(negedge clk); wc_empty = 1;
    check_event(4, 1, 2, 1);
    `CHK(f1_empty && f2_empty, "aborted data discarded");
    // event 3: abort requested but aborts ignored
    ignore_abort = 1;
    abort_bit(1); load(1, 3, 3);
    for (int k = 0; k < 3; k++) wc_words[k] = 32'(30 + k);
    wc_empty = 0; wait (wc_rd); @(negedge clk); wc_empty = 1;
    check_event(1, 3, 3, 0);
    `CHK(eoes == 3 && eoe_aborts == 1, "end of event to overflow detector");
    `FINISH
  end
endmodule
