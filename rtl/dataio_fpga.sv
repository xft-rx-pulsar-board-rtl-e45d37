// dataio_fpga: one DataIO FPGA of the XFT Rx board (two per board, identical).
// Six Finder channels, each with its own XFTDAQ receiver, feed a Merger State
// Machine that reads the channels' output FIFOs in order; the Word Count
// Inserter then sends the merged event to the Control FPGA, ending with the
// Data EOE pair and two word count words. A VME register block gives the
// channel enables (power-up 0x3F), a soft reset, and readout of the input DAQ
// RAMs and word counts. The first channel's output FIFO is 256 words, the
// others 512, as on the board. One clock runs everything (own choice).
module dataio_fpga #(
  parameter int LAT_TICK_CYCLES = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] fin_data [6],
  input  logic [5:0]  fin_strobe,
  input  logic        l1a,
  input  logic [1:0]  l1a_buf,
  input  xft_pkg::vme_req_t vme_req,
  output logic [31:0] vme_rdata,
  output logic        vme_rvalid,
  output xft_pkg::dio_link_t link
);
  import xft_pkg::*;
  logic srst, soft_reset;
  logic [5:0] chan_en;
  assign srst = rst || soft_reset;

  logic [15:0] tick;
  latency_meter #(.TICK_CYCLES(LAT_TICK_CYCLES)) u_lat (.clk, .rst(srst), .tick);

  logic [5:0]  f_empty, f_eoe, f_rd;
  logic [31:0] f_data [6];
  logic [8:0]  ram_raddr;
  logic [31:0] ram_rdata [6];
  logic [WCW-1:0] wc [6][4];

  for (genvar i = 0; i < 6; i++) begin : g_ch
    logic [9:0] used;
    xftdaq #(.OFIFO_DEPTH(i == 0 ? 256 : 512), .RAM_DEPTH(512)) u_daq (
      .clk, .rst(srst), .fin_data(fin_data[i]), .fin_strobe(fin_strobe[i]),
      .l1a, .l1a_buf, .tick,
      .ofifo_rd(f_rd[i]), .ofifo_data(f_data[i]), .ofifo_eoe(f_eoe[i]),
      .ofifo_empty(f_empty[i]), .ofifo_usedw(used[(i == 0 ? 8 : 9):0]),
      .ram_raddr, .ram_rdata(ram_rdata[i]), .wc(wc[i]));
    if (i == 0) begin : g_pad
      assign used[9] = 1'b0;
    end
  end

  logic [31:0] m_data;
  logic m_valid, m_last, m_ready;
  dataio_merger u_merge (
    .clk, .rst(srst), .chan_en, .f_empty, .f_eoe, .f_data, .f_rd,
    .out_ready(m_ready), .out_data(m_data), .out_valid(m_valid), .out_last(m_last));

  dio_wc_inserter u_ins (
    .clk, .rst(srst), .l1a, .l1a_buf, .chan_en, .wc,
    .in_data(m_data), .in_valid(m_valid), .in_last(m_last), .in_ready(m_ready),
    .link);

  dataio_vme u_vme (
    .clk, .rst, .req(vme_req), .rdata(vme_rdata), .rvalid(vme_rvalid),
    .soft_reset, .chan_en, .ram_raddr, .ram_rdata, .wc);
endmodule
