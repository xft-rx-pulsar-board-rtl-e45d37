// tb_event_abort_logic: abort decisions arrive over the P2 backplane
// (active low) and over TS_IN (active high), with the abort bit 25 ns ahead
// of a 25 ns strobe; the FIFO must hold them in order with the right value
// and record the source used last.
`include "tb/tb_util.svh"
module tb_event_abort_logic;
  logic clk = 0, rst = 1;
  always #6.25 clk = ~clk;   // 80 MHz
  int checks = 0, failures = 0;
  `WATCHDOG(5000)
  logic bp_abort_n, bp_strobe_n, ts_abort, ts_strobe, rd, empty, abort_event, last_src;
  event_abort_logic dut (.clk, .rst, .bp_abort_n, .bp_strobe_n, .ts_abort, .ts_strobe, .rd,
    .empty, .abort_event, .last_src);

  task automatic send_bp(input logic v);
    bp_abort_n = !v; #25; bp_strobe_n = 0; #25; bp_strobe_n = 1; bp_abort_n = 1; #200;
  endtask
  task automatic send_ts(input logic v);
    ts_abort = v; #25; ts_strobe = 1; #25; ts_strobe = 0; ts_abort = 0; #200;
  endtask

  logic seq [6] = '{1, 0, 1, 1, 0, 0};
  initial begin
    bp_abort_n = 1; bp_strobe_n = 1; ts_abort = 0; ts_strobe = 0; rd = 0;
    #30 rst = 0;
    send_bp(seq[0]); send_bp(seq[1]); send_bp(seq[2]);
    `CHK(last_src == 0, "source: P2");
    send_ts(seq[3]); send_ts(seq[4]); send_ts(seq[5]);
    `CHK(last_src == 1, "source: TS_IN");
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      `CHK(!empty && abort_event == seq[i], $sformatf("abort %0d", i));
      rd = 1; @(negedge clk); rd = 0;
    end
    `CHK(empty, "one entry per strobe");
    `FINISH
  end
endmodule
