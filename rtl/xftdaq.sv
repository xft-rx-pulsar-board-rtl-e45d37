// xftdaq: receiver for one XFT Finder channel (one per fibre, six per DataIO FPGA).
// 16-bit words from the Finder enter a 32-word input FIFO. A word with bit 15
// high marks the start (bits 15:14 = 10) or the end (11) of a packet; data
// words have bit 15 low. For every L1A a 16-entry L1A FIFO records the L2
// buffer number and a latency time stamp. State Machine 1 takes one L1A
// entry, waits for the first word, then packs pairs of 16-bit words into
// 32-bit words (first word in bits 15:0, second in 31:16). Each 32-bit word
// goes to the output FIFO (with an end-of-event flag) and to the input DAQ
// RAM at {buffer, write address counter}. If the end word falls in the low
// half, it is written to both halves. After the end word two latency words
// (L1A to first word, L1A to end word, 100 ns units, bits 15:0) are written
// to the last two addresses of the 128-word buffer. The per-buffer word count
// (32-bit words sent for the event, including the end word) is updated in
// the cycle the end word is written.
// Interface: Finder data/strobe in, L1A/buffer in, show-ahead output FIFO
// read port, DAQ RAM read port and four word counts out. A full output FIFO
// stalls the state machine; a word arriving at a full input FIFO is lost.
// FIFO and RAM sizes, the buffer split and the packing are the board's;
// half order, end-word padding and latency word placement are this design's.
module xftdaq #(
  parameter int OFIFO_DEPTH = 512,
  parameter int RAM_DEPTH   = 512,
  localparam int RAW  = $clog2(RAM_DEPTH),
  localparam int OUW  = $clog2(OFIFO_DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  // Finder channel
  input  logic [15:0] fin_data,
  input  logic        fin_strobe,
  // trigger
  input  logic        l1a,
  input  logic [1:0]  l1a_buf,
  input  logic [15:0] tick,
  // output FIFO towards the merger
  input  logic        ofifo_rd,
  output logic [31:0] ofifo_data,
  output logic        ofifo_eoe,
  output logic        ofifo_empty,
  output logic [OUW:0] ofifo_usedw,
  // DAQ RAM readout
  input  logic [RAW-1:0] ram_raddr,
  output logic [31:0] ram_rdata,
  // word count of the last event in each buffer
  output logic [xft_pkg::WCW-1:0] wc [4]
);
  import xft_pkg::*;
  localparam int BW = RAW - 2;                 // address bits inside a buffer
  localparam logic [BW-1:0] LAT0 = BW'((RAM_DEPTH/4) - 2);

  typedef enum logic [2:0] {
    NULL_S, WAIT_FIRST_S, READ_LO_S, READ_HI_S, WRITE_BOE_LAT_S, WRITE_EOE_LAT_S
  } sm1_t;
  sm1_t st;

  // input FIFO
  logic [15:0] in_q;
  logic in_empty, in_full, in_rd;
  logic [5:0] in_used;
  sync_fifo #(.WIDTH(16), .DEPTH(32)) u_in (
    .clk, .rst, .wr_en(fin_strobe), .wr_data(fin_data), .rd_en(in_rd),
    .rd_data(in_q), .empty(in_empty), .full(in_full), .usedw(in_used));

  // L1A FIFO: {time stamp, buffer}
  logic [17:0] l1_q;
  logic l1_empty, l1_full, l1_rd;
  logic [4:0] l1_used;
  sync_fifo #(.WIDTH(18), .DEPTH(16)) u_l1a (
    .clk, .rst, .wr_en(l1a), .wr_data({tick, l1a_buf}), .rd_en(l1_rd),
    .rd_data(l1_q), .empty(l1_empty), .full(l1_full), .usedw(l1_used));

  // output FIFO: {eoe, data}
  logic [32:0] of_d;
  logic of_we, of_full;
  logic [32:0] of_q;
  sync_fifo #(.WIDTH(33), .DEPTH(OFIFO_DEPTH)) u_out (
    .clk, .rst, .wr_en(of_we), .wr_data(of_d), .rd_en(ofifo_rd),
    .rd_data(of_q), .empty(ofifo_empty), .full(of_full), .usedw(ofifo_usedw));
  assign ofifo_data = of_q[31:0];
  assign ofifo_eoe  = of_q[32];

  // input DAQ RAM
  logic ram_we;
  logic [RAW-1:0] ram_wa;
  logic [31:0] ram_wd;
  daq_ram #(.WIDTH(32), .DEPTH(RAM_DEPTH)) u_ram (
    .clk, .we(ram_we), .waddr(ram_wa), .wdata(ram_wd),
    .raddr(ram_raddr), .rdata(ram_rdata));

  logic [1:0]  bufn;
  logic [15:0] ts, boe_lat, eoe_lat;
  logic [15:0] lo;
  logic        first;
  logic [BW-1:0] waddr;          // write address counter
  logic [WCW-1:0] cnt;

  logic word_ok;                 // a 16-bit word can be taken this cycle
  logic is_end;                  // head of input FIFO is the end word
  logic [31:0] word32;
  logic put;                     // write a 32-bit word this cycle
  assign word_ok = !in_empty && !of_full;
  assign is_end  = in_q[15] && !first;

  always_comb begin
    in_rd = 1'b0; l1_rd = 1'b0; put = 1'b0; word32 = '0;
    ram_we = 1'b0; ram_wa = '0; ram_wd = '0;
    unique case (st)
      NULL_S: l1_rd = !l1_empty;
      READ_LO_S: if (word_ok) begin
        in_rd = 1'b1;
        if (is_end) begin put = 1'b1; word32 = {in_q, in_q}; end
      end
      READ_HI_S: if (word_ok) begin
        in_rd = 1'b1; put = 1'b1; word32 = {in_q, lo};
      end
      WRITE_BOE_LAT_S: begin
        ram_we = 1'b1; ram_wa = {bufn, LAT0}; ram_wd = {16'h0, boe_lat};
      end
      WRITE_EOE_LAT_S: begin
        ram_we = 1'b1; ram_wa = {bufn, LAT0 + 1'b1}; ram_wd = {16'h0, eoe_lat};
      end
      default: ;
    endcase
    if (put && waddr < LAT0) begin
      ram_we = 1'b1; ram_wa = {bufn, waddr}; ram_wd = word32;
    end
  end
  assign of_we = put;
  assign of_d  = {is_end, word32};

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= NULL_S; bufn <= '0; ts <= '0; boe_lat <= '0; eoe_lat <= '0;
      lo <= '0; first <= 1'b0; waddr <= '0; cnt <= '0;
      for (int b = 0; b < 4; b++) wc[b] <= '0;
    end else begin
      if (put) begin
        if (waddr < LAT0) waddr <= waddr + 1'b1;
        if (cnt != '1) cnt <= cnt + 1'b1;
        if (is_end) wc[bufn] <= (cnt != '1) ? cnt + 1'b1 : cnt;
      end
      unique case (st)
        NULL_S: if (!l1_empty) begin
          bufn <= l1_q[1:0]; ts <= l1_q[17:2];
          waddr <= '0; cnt <= '0; first <= 1'b1;
          st <= WAIT_FIRST_S;
        end
        WAIT_FIRST_S: if (!in_empty) begin
          boe_lat <= tick - ts;
          st <= READ_LO_S;
        end
        READ_LO_S: if (word_ok) begin
          lo <= in_q; first <= 1'b0;
          if (is_end) begin eoe_lat <= tick - ts; st <= WRITE_BOE_LAT_S; end
          else st <= READ_HI_S;
        end
        READ_HI_S: if (word_ok) begin
          if (is_end) begin eoe_lat <= tick - ts; st <= WRITE_BOE_LAT_S; end
          else st <= READ_LO_S;
        end
        WRITE_BOE_LAT_S: st <= WRITE_EOE_LAT_S;
        WRITE_EOE_LAT_S: st <= NULL_S;
        default: st <= NULL_S;
      endcase
    end
  end
endmodule
