// event_abort_logic: receives the event abort decision from the Tracklist A
// board, either over the P2 backplane (TTL, active low: PULSAR_FREEZE* for
// the abort data, PULSAR_SPARE* for the strobe) or over the front panel
// TS_IN LVDS pair (active high after the receiver). Both inputs pass two
// synchronising flip-flops. A rising strobe edge on either source samples
// that source's abort bit into a 16-entry abort FIFO, one entry per L1A in
// L1A order; whichever connector strobes is used, so the source is detected
// automatically. `last_src` tells which one strobed last (0 = P2, 1 = TS_IN).
// The strobe is 25 ns wide with the abort bit stable 25 ns before it.
// Connector roles and polarities follow the board; the FIFO depth and the
// edge-sampling scheme are this design's own.
module event_abort_logic (
  input  logic clk,
  input  logic rst,
  input  logic bp_abort_n,
  input  logic bp_strobe_n,
  input  logic ts_abort,
  input  logic ts_strobe,
  input  logic rd,
  output logic empty,
  output logic abort_event,
  output logic last_src
);
  logic [1:0] s_bpa, s_bps, s_tsa, s_tss;
  logic bps_d, tss_d;
  logic bp_edge, ts_edge;

  always_ff @(posedge clk) begin
    if (rst) begin
      s_bpa <= '0; s_bps <= '0; s_tsa <= '0; s_tss <= '0;
      bps_d <= 1'b0; tss_d <= 1'b0; last_src <= 1'b0;
    end else begin
      s_bpa <= {s_bpa[0], !bp_abort_n};
      s_bps <= {s_bps[0], !bp_strobe_n};
      s_tsa <= {s_tsa[0], ts_abort};
      s_tss <= {s_tss[0], ts_strobe};
      bps_d <= s_bps[1];
      tss_d <= s_tss[1];
      if (bp_edge) last_src <= 1'b0;
      else if (ts_edge) last_src <= 1'b1;
    end
  end
  assign bp_edge = s_bps[1] && !bps_d;
  assign ts_edge = s_tss[1] && !tss_d;

  logic full;
  logic [4:0] used;
  sync_fifo #(.WIDTH(1), .DEPTH(16)) u_fifo (
    .clk, .rst, .wr_en(bp_edge || ts_edge),
    .wr_data(bp_edge ? s_bpa[1] : s_tsa[1]),
    .rd_en(rd), .rd_data(abort_event), .empty, .full, .usedw(used));
endmodule
