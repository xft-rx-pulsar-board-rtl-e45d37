// tb_dio_wc_inserter: checks the link sequence of a DataIO event: data words
// with the strobe, the last word twice with Data EOE, then word count word 1
// and word 2 on the next two cycles with their strobes only, with the counts
// of the L1A's buffer packed 7 bits each and zero for disabled channels.
`include "tb/tb_util.svh"
module tb_dio_wc_inserter;
  import xft_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `WATCHDOG(5000)
  logic l1a; logic [1:0] l1a_buf; logic [5:0] chan_en;
  logic [6:0] wc [6][4];
  logic [31:0] in_data; logic in_valid, in_last, in_ready;
  dio_link_t link;
  dio_wc_inserter dut (.clk, .rst, .l1a, .l1a_buf, .chan_en, .wc, .in_data, .in_valid,
    .in_last, .in_ready, .link);

  task automatic event_run(input logic [1:0] b, input logic [5:0] en);
    logic [6:0] c [6];
    chan_en = en;
    @(negedge clk); l1a = 1; l1a_buf = b; @(negedge clk); l1a = 0;
    for (int i = 0; i < 6; i++) c[i] = en[i] ? wc[i][b] : 7'd0;
    for (int i = 0; i < 4; i++) begin
      in_data = 32'hA000 + i; in_valid = 1; in_last = (i == 3);
      `CHK(in_ready, "ready while passing");
      @(negedge clk);
      `CHK(link.strobe && link.data == 32'hA000 + i && !link.wc_strobe0 && !link.wc_strobe1, "data word");
      `CHK(link.eoe == (i == 3), "eoe on last word");
    end
    in_valid = 0; in_last = 0;
    `CHK(!in_ready, "not ready during trailer");
    @(negedge clk);
    `CHK(link.strobe && link.eoe && link.data == 32'hA003, "repeated EOE word");
    @(negedge clk);
    `CHK(!link.strobe && !link.eoe && link.wc_strobe0 && !link.wc_strobe1, "wc strobe 0");
    `CHK(link.data == {2'b0, c[3], c[2], 2'b0, c[1], c[0]}, "word count word 1");
    @(negedge clk);
    `CHK(!link.strobe && !link.wc_strobe0 && link.wc_strobe1, "wc strobe 1");
    `CHK(link.data == {18'b0, c[5], c[4]}, "word count word 2");
    @(negedge clk);
    `CHK(link == '0, "idle after");
  endtask

  initial begin
    l1a = 0; l1a_buf = 0; chan_en = '1; in_data = 0; in_valid = 0; in_last = 0;
    for (int i = 0; i < 6; i++) for (int b = 0; b < 4; b++) wc[i][b] = 7'(i * 16 + b * 3 + 1);
    repeat (3) @(posedge clk); #1 rst = 0;
    event_run(2'd1, 6'h3F);
    event_run(2'd3, 6'h3F);
    event_run(2'd2, 6'b101001);
    `FINISH
  end
endmodule
