// dio_wc_inserter: Word Count Storage, Word Count Inserter and Output Buffers
// of a DataIO FPGA.
// Passes the merged data words to the Control FPGA link with the data strobe.
// At the end word of the event (from the merger) it sends that word twice
// with Data EOE high, then word count word 1 (word count strobe 0) and word
// count word 2 (word count strobe 1) on the next two cycles. The word counts
// are those of the event's L2 buffer, taken from the channels' per-buffer
// registers; the buffer number comes from a 16-entry FIFO written at each
// L1A. Disabled channels report zero.
//   word 1 = {2'b0, ch4, ch3, 2'b0, ch2, ch1}    (7-bit counts)
//   word 2 = {18'b0, ch6, ch5}
// All link outputs are registered. `in_ready` is low during the three extra
// cycles. The link sequence and word formats are the board's; the buffer
// number FIFO is this design's way of choosing which counts to send.
module dio_wc_inserter (
  input  logic        clk,
  input  logic        rst,
  input  logic        l1a,
  input  logic [1:0]  l1a_buf,
  input  logic [5:0]  chan_en,
  input  logic [xft_pkg::WCW-1:0] wc [6][4],
  input  logic [31:0] in_data,
  input  logic        in_valid,
  input  logic        in_last,
  output logic        in_ready,
  output xft_pkg::dio_link_t link
);
  import xft_pkg::*;
  typedef enum logic [1:0] {PASS_S, EOE2_S, WC1_S, WC2_S} ist_t;
  ist_t st;
  logic [31:0] last_word;

  logic [1:0] bq;
  logic b_empty, b_full, b_rd;
  logic [4:0] b_used;
  sync_fifo #(.WIDTH(2), .DEPTH(16)) u_buf (
    .clk, .rst, .wr_en(l1a), .wr_data(l1a_buf), .rd_en(b_rd),
    .rd_data(bq), .empty(b_empty), .full(b_full), .usedw(b_used));

  logic [WCW-1:0] c [6];
  always_comb
    for (int i = 0; i < 6; i++) c[i] = chan_en[i] ? wc[i][bq] : '0;

  logic [31:0] w1, w2;
  assign w1 = {2'b00, c[3], c[2], 2'b00, c[1], c[0]};
  assign w2 = {18'b0, c[5], c[4]};

  assign in_ready = (st == PASS_S);
  assign b_rd = (st == WC2_S);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= PASS_S; link <= '0; last_word <= '0;
    end else begin
      link <= '0;
      unique case (st)
        PASS_S: if (in_valid) begin
          link.data <= in_data; link.strobe <= 1'b1;
          if (in_last) begin
            link.eoe <= 1'b1; last_word <= in_data; st <= EOE2_S;
          end
        end
        EOE2_S: begin
          link.data <= last_word; link.strobe <= 1'b1; link.eoe <= 1'b1;
          st <= WC1_S;
        end
        WC1_S: begin link.data <= w1; link.wc_strobe0 <= 1'b1; st <= WC2_S; end
        WC2_S: begin link.data <= w2; link.wc_strobe1 <= 1'b1; st <= PASS_S; end
        default: st <= PASS_S;
      endcase
    end
  end
endmodule
