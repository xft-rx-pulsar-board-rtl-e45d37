// xft_rx_top: the XFT Rx Pulsar board (trigger data receiver for the L2 trigger).
// Twelve XFT Finder channels arrive on two DataIO FPGAs (six channels each),
// which pack, record and merge them and send one packet each to the Control
// FPGA. The Control FPGA merges both packets, appends the twelve channel word
// counts, applies the event abort from the Tracklist board and the FILAR
// overflow protection, and sends the event on S-LINK. The VME bus is decoded
// here by address bits 19..18: 00 Control FPGA, 10 DataIO FPGA 1, 11 DataIO
// FPGA 2; read data of the addressed FPGA is returned one cycle after `rd`.
// The optical receivers, S-LINK card, connectors and line receivers are
// outside this logic; their signals are the ports. The IDPROM contents are
// board data supplied on `idprom_data`. One clock (80 MHz) drives all logic.
module xft_rx_top (
  input  logic        clk,
  input  logic        rst,
  // Finder channels 1-12 (DataIO 1: 1-6, DataIO 2: 7-12)
  input  logic [15:0] fin_data [12],
  input  logic [11:0] fin_strobe,
  // trigger
  input  logic        l1a,
  input  logic [1:0]  l1a_buf,
  input  logic        bc_strobe,
  input  logic        b0_marker,
  // event abort: P2 backplane (active low) and TS_IN (LVDS)
  input  logic        bp_abort_n,
  input  logic        bp_strobe_n,
  input  logic        ts_abort,
  input  logic        ts_strobe,
  // VME register bus
  input  xft_pkg::vme_req_t vme_req,
  output logic [31:0] vme_rdata,
  output logic        vme_rvalid,
  // IDPROM contents
  output logic [4:0]  idprom_addr,
  input  logic [7:0]  idprom_data,
  // S-LINK outputs via P3
  output xft_pkg::slink_t slink1,
  output xft_pkg::slink_t slink2
);
  import xft_pkg::*;
  vme_req_t req_d1, req_d2, req_c;
  logic [31:0] rd_d1, rd_d2, rd_c;
  logic rv_d1, rv_d2, rv_c;
  logic [1:0] sel_q;

  always_comb begin
    req_d1 = vme_req; req_d2 = vme_req; req_c = vme_req;
    if (vme_req.addr[19:18] != 2'b10) begin req_d1.wr = 1'b0; req_d1.rd = 1'b0; end
    if (vme_req.addr[19:18] != 2'b11) begin req_d2.wr = 1'b0; req_d2.rd = 1'b0; end
    if (vme_req.addr[19:18] != 2'b00) begin req_c.wr  = 1'b0; req_c.rd  = 1'b0; end
  end
  always_ff @(posedge clk) begin
    if (rst) sel_q <= '0;
    else if (vme_req.rd) sel_q <= vme_req.addr[19:18];
  end
  assign vme_rvalid = rv_d1 || rv_d2 || rv_c;
  assign vme_rdata  = (sel_q == 2'b10) ? rd_d1 : (sel_q == 2'b11) ? rd_d2 :
                      (sel_q == 2'b00) ? rd_c : '0;

  dio_link_t link1, link2;
  dataio_fpga u_dio1 (.clk, .rst, .fin_data(fin_data[0:5]), .fin_strobe(fin_strobe[5:0]),
    .l1a, .l1a_buf, .vme_req(req_d1), .vme_rdata(rd_d1), .vme_rvalid(rv_d1), .link(link1));
  dataio_fpga u_dio2 (.clk, .rst, .fin_data(fin_data[6:11]), .fin_strobe(fin_strobe[11:6]),
    .l1a, .l1a_buf, .vme_req(req_d2), .vme_rdata(rd_d2), .vme_rvalid(rv_d2), .link(link2));

  control_fpga u_ctrl (.clk, .rst, .link1, .link2, .l1a, .l1a_buf, .bc_strobe, .b0_marker,
    .bp_abort_n, .bp_strobe_n, .ts_abort, .ts_strobe,
    .vme_req(req_c), .vme_rdata(rd_c), .vme_rvalid(rv_c),
    .idprom_addr, .idprom_data, .slink1, .slink2);
endmodule
