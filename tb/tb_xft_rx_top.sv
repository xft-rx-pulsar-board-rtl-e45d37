// tb_xft_rx_top: end-to-end test of the whole board at its default sizes.
// Twelve Finder channels send packets after each L1A; the S-LINK output is
// compared word for word with a model of the event: BOF, header 1 (bunch
// count, buffer), header 2 (latency), the packed data of channels 1-12 in
// order, the three word count words, the trailer (size, flags) and EOF.
// Events exercise: aborts ignored (power-up), an abort over P2 that does not
// abort, an abort over TS_IN that does, a disabled channel, truncation by the
// FILAR overflow detector, an overflow carried into the next event and
// cleared by its timer, odd packets padded, and VME readout of the DAQ RAMs,
// word counts and IDPROM. Each mechanism is counted and must occur.
`include "tb/tb_util.svh"
module tb_xft_rx_top;
  import xft_pkg::*;
  logic clk = 0, rst = 1;
  always #6.25 clk = ~clk;     // 80 MHz
  int checks = 0, failures = 0;
  `WATCHDOG(200000)

  logic [15:0] fin_data [12]; logic [11:0] fin_strobe;
  logic l1a, bc_strobe, b0_marker; logic [1:0] l1a_buf;
  logic bp_abort_n, bp_strobe_n, ts_abort, ts_strobe;
  vme_req_t vme_req; logic [31:0] vme_rdata; logic vme_rvalid;
  logic [4:0] idprom_addr; logic [7:0] idprom_data;
  slink_t slink1, slink2;
  xft_rx_top dut (.clk, .rst, .fin_data, .fin_strobe, .l1a, .l1a_buf, .bc_strobe, .b0_marker,
    .bp_abort_n, .bp_strobe_n, .ts_abort, .ts_strobe, .vme_req, .vme_rdata, .vme_rvalid,
    .idprom_addr, .idprom_data, .slink1, .slink2);
  assign idprom_data = 8'(idprom_addr) * 8'd3;   // stand-in ID PROM contents

  // mechanisms seen
  int n_ignored = 0, n_p2 = 0, n_ts_abort = 0, n_disabled = 0, n_trunc = 0, n_carry = 0,
      n_timer_clear = 0, n_padded = 0, n_vme = 0, n_events = 0;

  // bunch crossings every 11 clocks, bunch zero at start; model counter
  int bc_model;
  always @(posedge clk) begin
    if (rst) begin bc_strobe <= 0; end
    else bc_strobe <= ($time / 12500) % 11 == 0;
  end
  always @(posedge clk) if (b0_marker) bc_model <= 41; else if (bc_strobe) bc_model <= bc_model + 1;

  slink_t got [$];
  always @(posedge clk) if (!rst && slink1.write) begin
    got.push_back(slink1);
    if (slink1 != slink2) begin failures++; $display("FAIL S-LINK ports differ"); end
  end

  task automatic vme(input logic [23:0] a, input logic w, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk); vme_req = '0; vme_req.addr = a; vme_req.wr = w; vme_req.rd = !w; vme_req.wdata = d;
    @(negedge clk); vme_req = '0; q = vme_rdata;
    if (!w) `CHK(vme_rvalid, "VME read valid");
  endtask

  // Finder packet of channel c (0..11) for event tag
  function automatic void packet(input int c, input int n, input int tag, ref logic [15:0] h[$]);
    h.delete();
    h.push_back(16'h8000 | 16'(tag * 16 + c));
    for (int i = 1; i <= n; i++) h.push_back(16'((tag * 37 + c * 11 + i) & 16'h7FFF));
    h.push_back(16'hC000 | 16'(tag * 16 + c));
  endfunction

  // abort_src: 0 none, 1 P2, 2 TS_IN
  task automatic run_event(input int tag, input logic [1:0] b, input int len [12],
      input logic [11:0] en, input int abort_src, input logic abort_val, input logic honour,
      input int trunc_to, input logic exp_trunc);
    logic [15:0] h [12][$];
    logic [31:0] dw [$];
    logic [6:0] cnt [12];
    logic [31:0] wcw [3];
    logic [31:0] exp_pkt [$];
    logic aborted;
    int bc_at_l1a, ndata;
    got.delete();
    @(negedge clk); l1a = 1; l1a_buf = b; bc_at_l1a = bc_model; @(negedge clk); l1a = 0;
    repeat (20) @(negedge clk);
    for (int c = 0; c < 12; c++) begin
      packet(c, len[c], tag, h[c]);
      cnt[c] = en[c] ? 7'((h[c].size() + 1) / 2) : 7'd0;
      if (h[c].size() % 2 == 1 && en[c]) n_padded++;
      if (en[c])
        for (int i = 0; i < h[c].size(); i += 2)
          dw.push_back(i + 1 < h[c].size() ? {h[c][i+1], h[c][i]} : {h[c][i], h[c][i]});
    end
    for (int c = 0; c < 12; c++) if (!en[c]) n_disabled++;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      for (int c = 0; c < 12; c++) begin
        fin_strobe[c] = i < h[c].size();
        fin_data[c] = i < h[c].size() ? h[c][i] : 16'h0;
      end
    end
    @(negedge clk); fin_strobe = '0;
    repeat (200) @(negedge clk);        // all data now in the Control FPGA
    if (abort_src == 1) begin
      bp_abort_n = !abort_val; #25 bp_strobe_n = 0; #25 bp_strobe_n = 1; bp_abort_n = 1;
      n_p2++;
    end else if (abort_src == 2) begin
      ts_abort = abort_val; #25 ts_strobe = 1; #25 ts_strobe = 0; ts_abort = 0;
    end
    repeat (400) @(negedge clk);
    aborted = honour && abort_src != 0 && abort_val;
    if (aborted) n_ts_abort++;
    if (!honour && abort_src != 0 && abort_val) n_ignored++;
    for (int k = 0; k < 3; k++)
      wcw[k] = {2'b0, cnt[4*k+3], cnt[4*k+2], 2'b0, cnt[4*k+1], cnt[4*k]};
    // expected packet after header 2
    if (aborted) exp_pkt.push_back(ABORT_WORD);
    else begin
      ndata = (trunc_to >= 0 && trunc_to < dw.size()) ? trunc_to : dw.size();
      for (int i = 0; i < ndata; i++) exp_pkt.push_back(dw[i]);
      for (int k = 0; k < 3; k++) exp_pkt.push_back(wcw[k]);
    end
    `CHK(got.size() == exp_pkt.size() + 5, $sformatf("event %0d packet length %0d want %0d", tag, got.size(), exp_pkt.size() + 5));
    if (got.size() != exp_pkt.size() + 5)
      foreach (got[i]) $display("  got[%0d] = %h %b", i, got[i].data, got[i].control);
    if (got.size() == exp_pkt.size() + 5) begin
      `CHK(got[0].data == SLINK_BOF && got[0].control, "BOF");
      `CHK(got[1].data == {8'h0, 4'h0, 2'h0, 8'h0, 8'(bc_at_l1a), b}, "header 1");
      `CHK(got[2].data[31:16] == 0 && got[2].data[15:0] > 0, $sformatf("header 2 latency %h", got[2].data));
      foreach (exp_pkt[i]) `CHK(got[3 + i].data == exp_pkt[i] && !got[3 + i].control,
                               $sformatf("event %0d word %0d", tag, i));
      `CHK(got[$-1].data == {16'(exp_pkt.size()), 13'b0, !honour, exp_trunc, aborted}, "trailer");
      `CHK(got[$].data == SLINK_EOF && got[$].control, "EOF");
      if (exp_trunc && !aborted) n_trunc++;
    end
    n_events++;
  endtask

  int len [12];
  logic [31:0] q;
  initial begin
    fin_strobe = '0; l1a = 0; l1a_buf = 0; b0_marker = 0;
    bp_abort_n = 1; bp_strobe_n = 1; ts_abort = 0; ts_strobe = 0; vme_req = '0;
    for (int c = 0; c < 12; c++) fin_data[c] = 0;
    repeat (4) @(posedge clk); #1 rst = 0;
    @(negedge clk); b0_marker = 1; @(negedge clk); b0_marker = 0;
    for (int c = 0; c < 12; c++) len[c] = 2 + (c % 5);

    // 1: power-up: aborts ignored; an abort request over TS_IN has no effect
    run_event(1, 2'd0, len, 12'hFFF, 2, 1, 0, -1, 0);
    // honour aborts from now on; reset the Control FPGA after the change
    vme(24'h000018, 1, 0, q);
    vme(24'h000004, 1, 1, q);
    @(negedge clk); b0_marker = 1; @(negedge clk); b0_marker = 0;
    // 2: abort decision 0 over P2
    run_event(2, 2'd1, len, 12'hFFF, 1, 0, 1, -1, 0);
    // 3: abort decision 1 over TS_IN -> single abort word
    run_event(3, 2'd2, len, 12'hFFF, 2, 1, 1, -1, 0);
    // 4: disable channel 2 (DataIO 1) and channel 12 (DataIO 2), then reset both
    vme(24'h08000C, 1, 32'b111101, q);
    vme(24'h0C000C, 1, 32'b011111, q);
    vme(24'h080004, 1, 1, q);
    vme(24'h0C0004, 1, 1, q);
    run_event(4, 2'd3, len, 12'b0111_1111_1101, 1, 0, 1, -1, 0);
    vme(24'h08000C, 1, 32'h3F, q);
    vme(24'h0C000C, 1, 32'h3F, q);
    vme(24'h080004, 1, 1, q);
    vme(24'h0C0004, 1, 1, q);
    // 5: word count max 8, long timer: truncated to 8 + 2 data words
    vme(24'h00001C, 1, {2'b0, 10'd8, 20'd20000}, q);
    run_event(5, 2'd0, len, 12'hFFF, 1, 0, 1, 10, 1);
    // 6: the stored count keeps total >= max: next event fully truncated
    run_event(6, 2'd1, len, 12'hFFF, 1, 0, 1, 0, 1);
    n_carry++;
    // wait for the timers to drain the registers, then a normal event
    vme(24'h000028, 0, 0, q);
    `CHK(q[21] && q[20], "state register 2: total >= max and overflow");
    repeat (20500) @(negedge clk);
    vme(24'h000028, 0, 0, q);
    `CHK(q[27:24] == 4'b0 && !q[21], "timers expired");
    if (q[27:24] == 4'b0) n_timer_clear++;
    vme(24'h00001C, 1, {2'b0, 10'd1023, 20'd16}, q);
    run_event(7, 2'd2, len, 12'hFFF, 2, 0, 1, -1, 0);
    // VME readout: Control DAQ RAM 1 buffer 2 header word and BOF
    vme(24'h000000, 0, 0, q); `CHK(q == CTRL_FW_VERSION, "control firmware version");
    vme(24'h080000, 0, 0, q); `CHK(q == DIO_FW_VERSION, "DataIO 1 firmware version");
    vme(24'h0C0020, 0, 0, q); `CHK(q == DIO_STATUS2, "DataIO 2 status 2");
    vme(24'h800000 | (24'd2 << 20), 0, 0, q);
    `CHK(q[31:23] == 9'd102 && q[12:8] == 0, "DAQ header word: board type");
    vme(24'h800004 | (24'd2 << 20), 0, 0, q); `CHK(q == SLINK_BOF, "DAQ RAM 1 holds BOF");
    vme(24'h000A00, 0, 0, q); `CHK(q == 32'(1 + got.size()), "control word count register");
    // DataIO 2 channel 3 (channel 9) first word of event 7 in buffer 2
    vme({4'b1010, 2'b11, 6'b0, 3'd2, 7'd0, 2'b0}, 0, 0, q);
    `CHK(q[15:0] == (16'h8000 | 16'(7 * 16 + 8)), "DataIO 2 input DAQ RAM");
    vme(24'h100000 + 24'd20, 0, 0, q); `CHK(q == {8'd15, 24'b0}, "IDPROM read");
    n_vme++;

    `CHK(n_events == 7, "events run");
    `CHK(n_ignored > 0, "mechanism: abort ignored");
    `CHK(n_p2 > 0, "mechanism: abort over P2");
    `CHK(n_ts_abort > 0, "mechanism: event aborted");
    `CHK(n_disabled > 0, "mechanism: channel disabled");
    `CHK(n_trunc > 1, "mechanism: truncation");
    `CHK(n_carry > 0, "mechanism: overflow carried to next event");
    `CHK(n_timer_clear > 0, "mechanism: timer clears word count registers");
    `CHK(n_padded > 0, "mechanism: odd packet padded");
    `CHK(n_vme > 0, "mechanism: VME readout");
    $display("mechanisms: ignored=%0d p2=%0d aborted=%0d disabled=%0d truncated=%0d carried=%0d timer=%0d padded=%0d",
             n_ignored, n_p2, n_ts_abort, n_disabled, n_trunc, n_carry, n_timer_clear, n_padded);
    `FINISH
  end
endmodule
