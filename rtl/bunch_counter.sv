// bunch_counter: Bunch Counter of the Control FPGA.
// An 8-bit counter advances on each bunch crossing strobe and is loaded with
// the Bunch Count Shift value (control register 1, power-up 41) on the
// bunch-zero marker. At every L1A the counter value, the L2 buffer number and
// the latency time stamp are queued in a 16-entry FIFO, read (show-ahead) by
// the S-LINK interface once per event. The board names the counter and the
// shift register; how the shift is applied and the event FIFO are this
// design's own choices.
module bunch_counter (
  input  logic        clk,
  input  logic        rst,
  input  logic        bc_strobe,
  input  logic        b0_marker,
  input  logic [7:0]  bc_shift,
  input  logic        l1a,
  input  logic [1:0]  l1a_buf,
  input  logic [15:0] tick,
  input  logic        rd,
  output logic        empty,
  output logic [7:0]  ev_bc,
  output logic [1:0]  ev_buf,
  output logic [15:0] ev_tick,
  output logic [7:0]  count
);
  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else if (b0_marker) count <= bc_shift;
    else if (bc_strobe) count <= count + 8'd1;
  end

  logic full;
  logic [4:0] used;
  sync_fifo #(.WIDTH(26), .DEPTH(16)) u_ev (
    .clk, .rst, .wr_en(l1a), .wr_data({tick, l1a_buf, count}), .rd_en(rd),
    .rd_data({ev_tick, ev_buf, ev_bc}), .empty, .full, .usedw(used));
endmodule
