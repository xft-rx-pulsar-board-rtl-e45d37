// tb_overflow_cases: replays six overflow scenarios on the FILAR Overflow
// Detector, with word count max = 10 and a 5 us timer (400 cycles of 12.5 ns).
// Each scenario is a run of successive packets ("channels") of back-to-back
// data words, separated either by a short gap (20 cycles, so the word count
// registers still hold the earlier packets) or by a long one (450 cycles, so
// the timers have cleared them):
//   1  13 words (overflow), long gap, 10 words      -> second packet passes
//   2  6 words, short gap, 10 words                 -> overflow in packet 2
//   3  14 words, short gap, 10 words                -> packet 2 fully dropped
//   4  14 words, then 4 slow words while the timer runs out -> packet 2
//      still dropped (the bit only clears between packets), packet 3 passes
//   5  14 words, short gap, 4 words, long gap, 4 words -> cleared for packet 3
//   6  4 words, long gap, 4 words, short gap, 10 words -> overflow in packet 3
// The expected numbers follow the rule of the block: a word arriving while
// the total is at or above max raises the overflow, and the two-cycle delay
// lets two more words through. They are therefore exact, where the board's
// drawings of the same scenarios are approximate (for example 13 words in,
// 12 out rather than 10). The timer enables and the word count registers
// are checked where the drawings show them, and the timer length exactly
// (400 cycles). Ends with the usual TB_RESULT line; a watchdog stops a hung
// run.
`include "tb/tb_util.svh"
module tb_overflow_cases;
  logic clk = 0, rst = 1;
  always #6.25 clk = ~clk;     // 80 MHz, 12.5 ns per timer tick
  int checks = 0, failures = 0;
  `WATCHDOG(100000)

  localparam int SHORT = 20, LONG = 450;
  logic data_strobe, eoe, abort_event, clear_ovf, out_strobe, flags_rd, flags_empty;
  logic [9:0] wc_max; logic [19:0] num_ticks; logic [15:0] error_flags;
  logic [9:0] cur_wc; logic [9:0] wc_reg [4]; logic [3:0] timer_en; logic [1:0] event_cnt;
  logic ge_max, overflow;
  filar_overflow_detector dut (.clk, .rst, .data_strobe, .end_of_event(eoe), .abort_event,
    .clear_ovf, .wc_max, .num_ticks, .out_strobe, .flags_rd, .flags_empty, .error_flags,
    .cur_wc, .wc_reg, .timer_en, .event_cnt, .ge_max, .overflow);

  int passed;
  always @(posedge clk) if (out_strobe) passed++;

  // cycles for which timer 0 has been enabled since the last reset
  int t0_cycles;
  always @(posedge clk) if (rst) t0_cycles <= 0; else if (timer_en[0]) t0_cycles <= t0_cycles + 1;

  // words seen while total < max during a packet (for scenario 4)
  int below_max_words;
  always @(posedge clk) if (data_strobe && !ge_max) below_max_words++;

  // One packet: the merger's between-packet clear, d words with sp - 1 idle
  // cycles after each, the end of the packet, then the error flags are read.
  task automatic pkt(input int d, input int sp, input int want, input logic want_trunc,
                     input string tag);
    @(negedge clk); clear_ovf = 1; @(negedge clk); clear_ovf = 0;
    passed = 0;
    below_max_words = 0;
    for (int i = 0; i < d; i++) begin
      data_strobe = 1; @(negedge clk); data_strobe = 0;
      repeat (sp - 1) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    eoe = 1; @(negedge clk); eoe = 0;
    @(negedge clk);
    `CHK(passed == want, $sformatf("%s: %0d of %0d words passed, want %0d", tag, passed, d, want));
    `CHK(!flags_empty && error_flags == {14'b0, want_trunc, 1'b0},
         $sformatf("%s: error flags %b", tag, error_flags));
    flags_rd = 1; @(negedge clk); flags_rd = 0;
  endtask

  task automatic gap(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic restart();
    rst = 1; repeat (2) @(negedge clk); rst = 0;
  endtask

  initial begin
    data_strobe = 0; eoe = 0; abort_event = 0; clear_ovf = 0; flags_rd = 0;
    wc_max = 10; num_ticks = 400;

    // 1: overflow from packet 1, cleared for packet 2
    restart();
    pkt(13, 1, 12, 1, "case 1 packet 1");
    `CHK(timer_en[0] && wc_reg[0] == 12 && overflow, "case 1: register 0 holds the count, timer running");
    gap(LONG);
    `CHK(!timer_en[0] && wc_reg[0] == 0 && !ge_max, "case 1: timer has cleared register 0");
    `CHK(t0_cycles == 400, $sformatf("case 1: register 0 held for %0d cycles, want 400 (5 us)", t0_cycles));
    pkt(10, 1, 10, 0, "case 1 packet 2");
    `CHK(wc_reg[1] == 10 && timer_en[1], "case 1: packet 2 stored in register 1");

    // 2: overflow from packet 2 (6 stored + 4 more reach max, 2 pass the delay)
    restart();
    pkt(6, 1, 6, 0, "case 2 packet 1");
    gap(SHORT);
    pkt(10, 1, 6, 1, "case 2 packet 2");
    `CHK(wc_reg[0] == 6 && wc_reg[1] == 6 && overflow, "case 2: registers and overflow bit");

    // 3: overflow from packet 1, continued through packet 2
    restart();
    pkt(14, 1, 12, 1, "case 3 packet 1");
    gap(SHORT);
    pkt(10, 1, 0, 1, "case 3 packet 2");
    `CHK(overflow && cur_wc == 0, "case 3: bit still set, nothing counted");

    // 4: the timer runs out in the middle of packet 2; it is still truncated
    restart();
    pkt(14, 1, 12, 1, "case 4 packet 1");
    gap(350);
    pkt(4, 20, 0, 1, "case 4 packet 2");
    `CHK(below_max_words > 0, "case 4: total fell below max during packet 2");
    gap(SHORT);
    pkt(4, 1, 4, 0, "case 4 packet 3");

    // 5: overflow from packet 1, continued through packet 2, cleared for packet 3
    restart();
    pkt(14, 1, 12, 1, "case 5 packet 1");
    gap(SHORT);
    pkt(4, 1, 0, 1, "case 5 packet 2");
    gap(LONG);
    pkt(4, 1, 4, 0, "case 5 packet 3");
    `CHK(!overflow, "case 5: overflow bit cleared");

    // 6: no overflow until packet 3 (4 still stored + 6 reach max, 2 more pass)
    restart();
    pkt(4, 1, 4, 0, "case 6 packet 1");
    gap(LONG);
    pkt(4, 1, 4, 0, "case 6 packet 2");
    `CHK(wc_reg[0] == 0 && wc_reg[1] == 4, "case 6: only packet 2 still counted");
    gap(SHORT);
    pkt(10, 1, 8, 1, "case 6 packet 3");
    `CHK(wc_reg[2] == 8 && overflow, "case 6: packet 3 stored at overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
