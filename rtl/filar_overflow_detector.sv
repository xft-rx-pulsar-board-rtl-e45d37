// filar_overflow_detector: FILAR Overflow Detector of the Control FPGA.
// Emulates the 512-word FILAR input FIFOs downstream so that events which
// would overflow them are truncated. The current word counter counts the
// data words that are passed on. At the end of an event, or when an overflow
// is raised during it, the count is stored in one of four word count
// registers (chosen by a 2-bit event counter) and that register's timer
// starts; when the timer has run `num_ticks` clock cycles the register is
// cleared. Total = current count + the four registers. A data word arriving
// while total >= `wc_max` raises the overflow bit two clock cycles later;
// while the bit is high the counter stops and the output data strobe is
// masked, which drops the words. The bit is cleared only between events
// (`clear_ovf` from the merger) and only if total < wc_max. At each end of
// event the error flags {overflow (bit 1), abort (bit 0)} are queued in a
// 16-entry error flags FIFO for the S-LINK trailer.
// With wc_max = 10 and back-to-back words this passes 12 words and flags
// truncation for 11 or more, as in the board's worked example. Only data
// words reach this block; word count, abort and S-LINK words bypass it.
// Structure and timing follow the board; the exact condition that raises
// the overflow (a word arriving at total >= max) is this design's reading.
module filar_overflow_detector (
  input  logic        clk,
  input  logic        rst,
  input  logic        data_strobe,
  input  logic        end_of_event,
  input  logic        abort_event,
  input  logic        clear_ovf,
  input  logic [9:0]  wc_max,
  input  logic [19:0] num_ticks,
  output logic        out_strobe,
  input  logic        flags_rd,
  output logic        flags_empty,
  output logic [15:0] error_flags,
  // state, for the VME state registers
  output logic [9:0]  cur_wc,
  output logic [9:0]  wc_reg [4],
  output logic [3:0]  timer_en,
  output logic [1:0]  event_cnt,
  output logic        ge_max,
  output logic        overflow
);
  logic [19:0] timer [4];
  logic [11:0] total;
  logic req_r, stored, store, counting;
  logic [9:0]  store_val;

  assign total = 12'(cur_wc) + 12'(wc_reg[0]) + 12'(wc_reg[1]) + 12'(wc_reg[2]) + 12'(wc_reg[3]);
  assign ge_max = total >= 12'(wc_max);
  assign out_strobe = data_strobe && !overflow;
  assign counting   = data_strobe && !overflow;
  assign store = !stored && (end_of_event || (req_r && !overflow));
  assign store_val = (counting && cur_wc != '1) ? cur_wc + 10'd1 : cur_wc;

  always_ff @(posedge clk) begin
    if (rst) begin
      req_r <= 1'b0; overflow <= 1'b0; stored <= 1'b0; cur_wc <= '0; event_cnt <= '0;
      for (int i = 0; i < 4; i++) begin wc_reg[i] <= '0; timer[i] <= '0; timer_en[i] <= 1'b0; end
    end else begin
      req_r <= data_strobe && ge_max && !overflow;
      if (req_r) overflow <= 1'b1;
      else if (clear_ovf && !ge_max) overflow <= 1'b0;

      for (int i = 0; i < 4; i++) begin
        if (timer_en[i]) begin
          if (timer[i] + 20'd1 >= num_ticks) begin
            timer_en[i] <= 1'b0; wc_reg[i] <= '0;
          end
          timer[i] <= timer[i] + 20'd1;
        end
      end

      if (store) begin
        wc_reg[event_cnt]   <= store_val;
        timer[event_cnt]    <= '0;
        timer_en[event_cnt] <= 1'b1;
        cur_wc <= '0;
        stored <= 1'b1;
      end else if (counting && cur_wc != '1) begin
        cur_wc <= cur_wc + 10'd1;
      end

      if (end_of_event) begin
        event_cnt <= event_cnt + 2'd1;
        stored <= 1'b0;
        cur_wc <= '0;
      end
    end
  end

  logic ff_full;
  logic [4:0] ff_used;
  sync_fifo #(.WIDTH(16), .DEPTH(16)) u_flags (
    .clk, .rst, .wr_en(end_of_event),
    .wr_data({14'b0, overflow || req_r, abort_event}),
    .rd_en(flags_rd), .rd_data(error_flags), .empty(flags_empty),
    .full(ff_full), .usedw(ff_used));
endmodule
