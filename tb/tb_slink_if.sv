// tb_slink_if: two events pass through the S-LINK interface. Checks the
// packet on both ports (BOF and EOF as control words, header 1 fields,
// header 2 latency, event words, trailer data size and error flags including
// the "ignoring aborts" bit) and the copy in output DAQ RAM 1 behind the DAQ
// header word, with the buffer's word count register.
`include "tb/tb_util.svh"
module tb_slink_if;
  import xft_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `WATCHDOG(5000)
  logic ignore_abort; logic [15:0] tick;
  logic of_wr, of_empty, of_rd, of_full; logic [32:0] of_d, of_q; logic [4:0] of_u;
  logic ev_wr, ev_empty, ev_rd, ev_full; logic [25:0] ev_d, ev_q; logic [4:0] ev_u;
  logic fl_wr, fl_empty, fl_rd, fl_full; logic [15:0] fl_d, fl_q; logic [4:0] fl_u;
  slink_t slink1, slink2; logic [10:0] ram_raddr; logic [31:0] ram_rdata; logic [9:0] wc [4];
  sync_fifo #(.WIDTH(33), .DEPTH(16)) fo (.clk, .rst, .wr_en(of_wr), .wr_data(of_d), .rd_en(of_rd),
    .rd_data(of_q), .empty(of_empty), .full(of_full), .usedw(of_u));
  sync_fifo #(.WIDTH(26), .DEPTH(16)) fe (.clk, .rst, .wr_en(ev_wr), .wr_data(ev_d), .rd_en(ev_rd),
    .rd_data(ev_q), .empty(ev_empty), .full(ev_full), .usedw(ev_u));
  sync_fifo #(.WIDTH(16), .DEPTH(16)) ff (.clk, .rst, .wr_en(fl_wr), .wr_data(fl_d), .rd_en(fl_rd),
    .rd_data(fl_q), .empty(fl_empty), .full(fl_full), .usedw(fl_u));
  slink_if #(.FORMAT(8'h5A), .SOURCE(4'h3), .REGION(2'h1), .SERIAL(10'h2AB)) dut (
    .clk, .rst, .ignore_abort, .tick, .of_empty, .of_q, .of_rd,
    .ev_empty, .ev_bc(ev_q[7:0]), .ev_buf(ev_q[9:8]), .ev_tick(ev_q[25:10]), .ev_rd,
    .fl_empty, .fl_q, .fl_rd, .slink1, .slink2, .ram_raddr, .ram_rdata, .wc);

  slink_t got [$];
  always @(posedge clk) if (!rst && slink1.write) begin
    got.push_back(slink1);
    if (slink1 != slink2) begin failures++; $display("FAIL ports differ"); end
  end

  task automatic run(input logic [1:0] b, input logic [7:0] bc, input int n,
                     input logic [15:0] flags, input logic ign);
    logic [31:0] exp_w [$];
    ignore_abort = ign; got.delete();
    @(negedge clk); ev_wr = 1; ev_d = {tick, b, bc}; @(negedge clk); ev_wr = 0;
    repeat (5) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); of_wr = 1; of_d = {i == n - 1, 32'(bc * 256 + i)};
    end
    @(negedge clk); of_wr = 0;
    repeat (3) @(negedge clk); fl_wr = 1; fl_d = flags; @(negedge clk); fl_wr = 0;
    repeat (20) @(negedge clk);
    exp_w.push_back(SLINK_BOF);
    exp_w.push_back({8'h5A, 4'h3, 2'h1, 8'h0, bc, b});
    exp_w.push_back(32'h0);   // latency checked below
    for (int i = 0; i < n; i++) exp_w.push_back(32'(bc * 256 + i));
    exp_w.push_back({16'(n), 13'b0, ign, flags[1:0]});
    exp_w.push_back(SLINK_EOF);
    `CHK(got.size() == exp_w.size(), "packet length");
    if (got.size() == exp_w.size()) foreach (exp_w[i]) begin
      if (i == 2) `CHK(got[i].data[31:16] == 0 && got[i].data[15:0] inside {[16'd5:16'd80]}, "header 2 latency")
      else `CHK(got[i].data == exp_w[i], $sformatf("packet word %0d", i));
      `CHK(got[i].control == (i == 0 || i == exp_w.size() - 1), "control flag");
    end
    // DAQ RAM copy
    ram_raddr = {b, 9'd0}; @(negedge clk);
    `CHK(ram_rdata == {9'd102, 10'h2AB, 5'b0, bc}, "DAQ header word");
    for (int i = 0; i < exp_w.size(); i++) begin
      ram_raddr = {b, 9'(i + 1)}; @(negedge clk);
      if (i != 2) `CHK(ram_rdata == exp_w[i], "DAQ RAM copy");
    end
    `CHK(wc[b] == 10'(exp_w.size() + 1), "DAQ RAM word count");
  endtask

  always @(posedge clk) if (rst) tick <= 0; else tick <= tick + 16'd1;
  initial begin
    ignore_abort = 0; of_wr = 0; ev_wr = 0; fl_wr = 0; of_d = 0; ev_d = 0; fl_d = 0; ram_raddr = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    run(2'd2, 8'h37, 5, 16'b10, 1'b0);
    run(2'd1, 8'h99, 1, 16'b01, 1'b1);
    `CHK(wc[2] == 10'd11, "earlier buffer count kept");
    `FINISH
  end
endmodule
