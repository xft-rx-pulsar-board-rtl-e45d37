// control_fpga: Control FPGA of the XFT Rx board.
// Each DataIO link fills a 512-word input FIFO with its data words and the
// EOE flag; the word count words go to the Word Count Storage, which merges
// them into three words. The Event Abort Logic queues one abort decision per
// L1A. The Merger State Machine builds each event (data of DataIO 1, data of
// DataIO 2, three word count words, or only 0xC000C000 if aborted) into the
// 2048-word Output FIFO; data words pass through the FILAR Overflow
// Detector, which drops them by masking their strobe when the downstream
// FIFOs could overflow. The S-LINK Interface frames each event and keeps a
// copy in output DAQ RAM 1. The VME block holds the control and state
// registers. Sizes are the board's; one clock for everything is own choice.
module control_fpga #(
  parameter int LAT_TICK_CYCLES = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  xft_pkg::dio_link_t link1,
  input  xft_pkg::dio_link_t link2,
  input  logic        l1a,
  input  logic [1:0]  l1a_buf,
  input  logic        bc_strobe,
  input  logic        b0_marker,
  input  logic        bp_abort_n,
  input  logic        bp_strobe_n,
  input  logic        ts_abort,
  input  logic        ts_strobe,
  input  xft_pkg::vme_req_t vme_req,
  output logic [31:0] vme_rdata,
  output logic        vme_rvalid,
  output logic [4:0]  idprom_addr,
  input  logic [7:0]  idprom_data,
  output xft_pkg::slink_t slink1,
  output xft_pkg::slink_t slink2
);
  import xft_pkg::*;
  logic srst, soft_reset;
  assign srst = rst || soft_reset;

  logic [7:0]  bc_shift;
  logic        ignore_abort;
  logic [9:0]  wc_max;
  logic [19:0] num_ticks;

  logic [15:0] tick;
  latency_meter #(.TICK_CYCLES(LAT_TICK_CYCLES)) u_lat (.clk, .rst(srst), .tick);

  // input FIFOs
  logic f1_empty, f2_empty, f1_rd, f2_rd, f1_full, f2_full;
  logic [32:0] f1_q, f2_q;
  logic [9:0] f1_used, f2_used;
  sync_fifo #(.WIDTH(33), .DEPTH(512)) u_in1 (
    .clk, .rst(srst), .wr_en(link1.strobe), .wr_data({link1.eoe, link1.data}),
    .rd_en(f1_rd), .rd_data(f1_q), .empty(f1_empty), .full(f1_full), .usedw(f1_used));
  sync_fifo #(.WIDTH(33), .DEPTH(512)) u_in2 (
    .clk, .rst(srst), .wr_en(link2.strobe), .wr_data({link2.eoe, link2.data}),
    .rd_en(f2_rd), .rd_data(f2_q), .empty(f2_empty), .full(f2_full), .usedw(f2_used));

  logic wc_empty, wc_rd;
  logic [31:0] wc_words [3];
  ctrl_wc_storage u_wcs (.clk, .rst(srst), .link1, .link2, .rd(wc_rd),
    .empty(wc_empty), .words(wc_words));

  logic ab_empty, ab_event, ab_rd, last_src;
  event_abort_logic u_abort (.clk, .rst(srst), .bp_abort_n, .bp_strobe_n,
    .ts_abort, .ts_strobe, .rd(ab_rd), .empty(ab_empty), .abort_event(ab_event),
    .last_src);

  logic [31:0] m_data;
  logic m_dstb, m_cstb, m_last, fod_eoe, fod_abort, clear_ovf;
  ctrl_merger u_merge (.clk, .rst(srst), .ignore_abort,
    .ab_empty, .ab_event, .ab_rd,
    .f1_empty, .f1_q, .f1_rd, .f2_empty, .f2_q, .f2_rd,
    .wc_empty, .wc_words, .wc_rd,
    .out_data(m_data), .data_strobe(m_dstb), .ctl_strobe(m_cstb), .out_last(m_last),
    .fod_eoe, .fod_abort, .clear_ovf);

  logic fod_strobe, fl_empty, fl_rd;
  logic [15:0] fl_q;
  logic [9:0] cur_wc;
  logic [9:0] wc_reg [4];
  logic [3:0] timer_en;
  logic [1:0] event_cnt;
  logic ge_max, overflow;
  filar_overflow_detector u_fod (.clk, .rst(srst), .data_strobe(m_dstb),
    .end_of_event(fod_eoe), .abort_event(fod_abort), .clear_ovf, .wc_max, .num_ticks,
    .out_strobe(fod_strobe), .flags_rd(fl_rd), .flags_empty(fl_empty), .error_flags(fl_q),
    .cur_wc, .wc_reg, .timer_en, .event_cnt, .ge_max, .overflow);

  // output FIFO {last, data}
  logic of_empty, of_rd, of_full;
  logic [32:0] of_q;
  logic [11:0] of_used;
  sync_fifo #(.WIDTH(33), .DEPTH(2048)) u_out (
    .clk, .rst(srst), .wr_en(fod_strobe || m_cstb), .wr_data({m_last, m_data}),
    .rd_en(of_rd), .rd_data(of_q), .empty(of_empty), .full(of_full), .usedw(of_used));

  logic ev_empty, ev_rd;
  logic [7:0] ev_bc, bc_count;
  logic [1:0] ev_buf;
  logic [15:0] ev_tick;
  bunch_counter u_bc (.clk, .rst(srst), .bc_strobe, .b0_marker, .bc_shift,
    .l1a, .l1a_buf, .tick, .rd(ev_rd), .empty(ev_empty), .ev_bc, .ev_buf, .ev_tick,
    .count(bc_count));

  logic [10:0] ram_raddr;
  logic [31:0] ram_rdata;
  logic [9:0]  ram_wc [4];
  slink_if u_slink (.clk, .rst(srst), .ignore_abort, .tick,
    .of_empty, .of_q, .of_rd, .ev_empty, .ev_bc, .ev_buf, .ev_tick, .ev_rd,
    .fl_empty, .fl_q, .fl_rd, .slink1, .slink2, .ram_raddr, .ram_rdata, .wc(ram_wc));

  ctrl_vme u_vme (.clk, .rst, .req(vme_req), .rdata(vme_rdata), .rvalid(vme_rvalid),
    .soft_reset, .bc_shift, .ignore_abort, .wc_max, .num_ticks,
    .cur_wc, .wc_reg, .timer_en, .event_cnt, .ge_max, .overflow,
    .ram_raddr, .ram_rdata, .ram_wc, .idprom_addr, .idprom_data);
endmodule
