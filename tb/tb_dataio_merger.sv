// tb_dataio_merger: six channel FIFOs are loaded with packets (channel c,
// word i -> {c, i}); with several enable patterns the merged stream must
// hold the enabled channels in order, each ending with its EOE word, with
// out_last on the last enabled channel's EOE only. Disabled channels' data
// must stay in their FIFOs. out_ready low must hold the stream.
`include "tb/tb_util.svh"
module tb_dataio_merger;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `WATCHDOG(40000)
  logic [5:0] chan_en, f_empty, f_eoe, f_rd, wr;
  logic [31:0] f_data [6];
  logic [32:0] wd [6], q [6];
  logic out_ready, out_valid, out_last; logic [31:0] out_data;
  for (genvar c = 0; c < 6; c++) begin : g
    logic full; logic [4:0] u;
    sync_fifo #(.WIDTH(33), .DEPTH(16)) f (.clk, .rst, .wr_en(wr[c]), .wr_data(wd[c]),
      .rd_en(f_rd[c]), .rd_data(q[c]), .empty(f_empty[c]), .full, .usedw(u));
    assign f_data[c] = q[c][31:0];
    assign f_eoe[c] = q[c][32];
  end
  dataio_merger dut (.clk, .rst, .chan_en, .f_empty, .f_eoe, .f_data, .f_rd,
    .out_ready, .out_data, .out_valid, .out_last);

  int len [6] = '{3, 1, 4, 2, 5, 2};
  logic [32:0] exp_q [$];
  int got, lasts, stalls;
  always @(posedge clk) if (!rst && out_valid) begin
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected word"); end
    else begin
      automatic logic [32:0] e = exp_q.pop_front();
      checks++;
      if (out_data != e[31:0] || out_last != e[32]) begin
        failures++; $display("FAIL word %h last %b, want %h %b", out_data, out_last, e[31:0], e[32]);
      end
    end
    got++;
  end

  task automatic run(input logic [5:0] en);
    int lastc = 0;
    chan_en = en;
    for (int c = 0; c < 6; c++) if (en[c]) lastc = c;
    for (int c = 0; c < 6; c++) begin
      for (int i = 0; i < len[c]; i++) begin
        @(negedge clk); wr = '0; wr[c] = 1;
        wd[c] = {i == len[c] - 1, 16'(c), 16'(i)};
        if (en[c]) exp_q.push_back({(i == len[c] - 1) && c == lastc, 16'(c), 16'(i)});
      end
      @(negedge clk); wr = '0;
    end
    // stall the output for a while
    out_ready = 0; repeat (10) @(negedge clk);
    `CHK(!out_valid, "held while not ready");
    out_ready = 1;
    repeat (80) @(negedge clk);
    `CHK(exp_q.size() == 0, "all enabled words merged");
    for (int c = 0; c < 6; c++) `CHK(f_empty[c] == en[c], "disabled channel untouched");
  endtask

  initial begin
    wr = 0; chan_en = 6'h3F; out_ready = 1; got = 0;
    for (int c = 0; c < 6; c++) wd[c] = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    run(6'b111111);
    rst = 1; @(negedge clk); rst = 0;
    run(6'b010101);
    rst = 1; @(negedge clk); rst = 0;
    run(6'b000110);
    `FINISH
  end
endmodule
