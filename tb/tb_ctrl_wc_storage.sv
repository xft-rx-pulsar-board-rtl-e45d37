// tb_ctrl_wc_storage: both DataIO links send their two word count words at
// different times; the merged three words must follow the 12-channel layout
// (channel k at its 7-bit field), and events must queue in order.
`include "tb/tb_util.svh"
module tb_ctrl_wc_storage;
  import xft_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `WATCHDOG(5000)
  dio_link_t link1, link2; logic rd, empty; logic [31:0] words [3];
  ctrl_wc_storage dut (.clk, .rst, .link1, .link2, .rd, .empty, .words);

  function automatic logic [31:0] w1(input logic [6:0] c [6]);
    return {2'b0, c[3], c[2], 2'b0, c[1], c[0]};
  endfunction
  function automatic logic [31:0] w2(input logic [6:0] c [6]);
    return {18'b0, c[5], c[4]};
  endfunction
  task automatic send(input int which, input logic [6:0] c [6]);
    @(negedge clk);
    if (which == 1) begin link1 = '0; link1.wc_strobe0 = 1; link1.data = w1(c); end
    else begin link2 = '0; link2.wc_strobe0 = 1; link2.data = w1(c); end
    @(negedge clk);
    if (which == 1) begin link1 = '0; link1.wc_strobe1 = 1; link1.data = w2(c); end
    else begin link2 = '0; link2.wc_strobe1 = 1; link2.data = w2(c); end
    @(negedge clk); link1 = '0; link2 = '0;
  endtask

  logic [6:0] a [2][6], b [2][6];
  initial begin
    link1 = '0; link2 = '0; rd = 0;
    for (int e = 0; e < 2; e++) for (int i = 0; i < 6; i++) begin
      a[e][i] = 7'(1 + i + 20 * e); b[e][i] = 7'(7 + i + 20 * e);
    end
    repeat (3) @(posedge clk); #1 rst = 0;
    send(1, a[0]);
    repeat (3) @(negedge clk);
    `CHK(empty, "waits for both FPGAs");
    send(1, a[1]);
    send(2, b[0]);
    send(2, b[1]);
    for (int e = 0; e < 2; e++) begin
      logic [6:0] ch [12];
      for (int i = 0; i < 6; i++) begin ch[i] = a[e][i]; ch[6 + i] = b[e][i]; end
      `CHK(!empty, "event ready");
      for (int k = 0; k < 3; k++)
        `CHK(words[k] == {2'b0, ch[4*k+3], ch[4*k+2], 2'b0, ch[4*k+1], ch[4*k]},
             $sformatf("event %0d word %0d", e, k + 1));
      rd = 1; @(negedge clk); rd = 0;
    end
    `CHK(empty, "empty after two events");
    `FINISH
  end
endmodule
