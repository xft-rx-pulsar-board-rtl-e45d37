// tb_filar_overflow_detector: reproduces the worked example of the overflow
// rule: word count max 10, one event of d back-to-back data words after a
// reset, d = 1..15. Expected words passed: min(d, 12); truncation flag for
// d >= 11. Then checks the timer (register cleared after num_ticks cycles),
// that an overflow carries into the next event while total >= max, that it
// clears between events once the timer has drained the registers, the abort
// flag, and the state outputs.
`include "tb/tb_util.svh"
module tb_filar_overflow_detector;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `WATCHDOG(50000)
  logic data_strobe, eoe, abort_event, clear_ovf, out_strobe, flags_rd, flags_empty;
  logic [9:0] wc_max; logic [19:0] num_ticks; logic [15:0] error_flags;
  logic [9:0] cur_wc; logic [9:0] wc_reg [4]; logic [3:0] timer_en; logic [1:0] event_cnt;
  logic ge_max, overflow;
  filar_overflow_detector dut (.clk, .rst, .data_strobe, .end_of_event(eoe), .abort_event,
    .clear_ovf, .wc_max, .num_ticks, .out_strobe, .flags_rd, .flags_empty, .error_flags,
    .cur_wc, .wc_reg, .timer_en, .event_cnt, .ge_max, .overflow);

  int passed;
  always @(posedge clk) if (out_strobe) passed++;

  // one event: clear between events, d words back to back, gap, end of event
  task automatic ev(input int d, input logic ab, output int np, output logic [15:0] fl);
    @(negedge clk); clear_ovf = 1; @(negedge clk); clear_ovf = 0;
    passed = 0;
    for (int i = 0; i < d; i++) begin data_strobe = 1; @(negedge clk); end
    data_strobe = 0;
    repeat (3) @(negedge clk);
    eoe = 1; abort_event = ab; @(negedge clk); eoe = 0; abort_event = 0;
    @(negedge clk);
    np = passed;
    fl = error_flags;
    `CHK(!flags_empty, "flags queued");
    flags_rd = 1; @(negedge clk); flags_rd = 0;
  endtask

  int np; logic [15:0] fl;
  initial begin
    data_strobe = 0; eoe = 0; abort_event = 0; clear_ovf = 0; flags_rd = 0;
    wc_max = 10; num_ticks = 400;
    for (int d = 1; d <= 15; d++) begin
      rst = 1; repeat (2) @(negedge clk); rst = 0;
      ev(d, 0, np, fl);
      `CHK(np == (d < 12 ? d : 12), $sformatf("d=%0d words passed %0d", d, np));
      `CHK(fl[1] == (d >= 11), $sformatf("d=%0d truncation flag", d));
      `CHK(fl[0] == 0 && fl[15:2] == 0, "no abort flag");
    end
    // timer: 15-word event stored 12 in register 0, timer running 400 cycles
    `CHK(wc_reg[0] == 12 && timer_en[0] && event_cnt == 1 && overflow && ge_max, "state after overflow");
    // next event while the register still holds 12: fully truncated
    ev(5, 1, np, fl);
    `CHK(np == 0, "overflow carried into next event");
    `CHK(fl == 16'b11, "truncation and abort flags");
    repeat (400) @(negedge clk);
    `CHK(wc_reg[0] == 0 && !timer_en[0] && !ge_max, "register cleared by timer");
    ev(4, 0, np, fl);
    `CHK(np == 4 && fl == 0, "overflow cleared between events");
    `CHK(wc_reg[2] == 4 && event_cnt == 3, "stored in next register");
    // two events summing past max: 6 then 10 -> second passes 4 + 2 delay = 6
    ev(6, 0, np, fl);
    `CHK(np == 6 && fl == 0, "6 words below max");
    ev(10, 0, np, fl);
    `CHK(np < 10 && fl[1], "sum of registers reaches max");
    `FINISH
  end
endmodule
