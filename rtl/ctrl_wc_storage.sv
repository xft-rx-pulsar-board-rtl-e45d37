// ctrl_wc_storage: Word Count Storage of the Control FPGA.
// Captures the two word count words each DataIO FPGA sends after its Data EOE
// (word 1 on word count strobe 0, word 2 on strobe 1) into a 4-entry FIFO
// per DataIO FPGA. When both FIFOs hold an event, the merged three words are
// presented (show-ahead) and `rd` pops both:
//   word 1 = DataIO 1 word 1                       (channels 4,3 | 2,1)
//   word 2 = {DataIO 2 word 1[15:0], DataIO 1 word 2[15:0]}  (8,7 | 6,5)
//   word 3 = {DataIO 2 word 2[15:0], DataIO 2 word 1[31:16]} (12,11 | 10,9)
// Each 16-bit half is {2'b0, 7-bit count, 7-bit count}. The merged format
// is the board's; the FIFOs are this design's way of pairing the two links.
module ctrl_wc_storage (
  input  logic clk,
  input  logic rst,
  input  xft_pkg::dio_link_t link1,
  input  xft_pkg::dio_link_t link2,
  input  logic        rd,
  output logic        empty,
  output logic [31:0] words [3]
);
  logic [31:0] w1a, w1b;
  logic [63:0] q1, q2;
  logic e1, e2, f1, f2;
  logic [2:0] u1, u2;

  always_ff @(posedge clk) begin
    if (rst) begin
      w1a <= '0; w1b <= '0;
    end else begin
      if (link1.wc_strobe0) w1a <= link1.data;
      if (link2.wc_strobe0) w1b <= link2.data;
    end
  end

  sync_fifo #(.WIDTH(64), .DEPTH(4)) u_f1 (
    .clk, .rst, .wr_en(link1.wc_strobe1), .wr_data({link1.data, w1a}),
    .rd_en(rd && !empty), .rd_data(q1), .empty(e1), .full(f1), .usedw(u1));
  sync_fifo #(.WIDTH(64), .DEPTH(4)) u_f2 (
    .clk, .rst, .wr_en(link2.wc_strobe1), .wr_data({link2.data, w1b}),
    .rd_en(rd && !empty), .rd_data(q2), .empty(e2), .full(f2), .usedw(u2));

  assign empty = e1 || e2;
  // q = {word 2, word 1}
  assign words[0] = q1[31:0];
  assign words[1] = {q2[15:0], q1[47:32]};
  assign words[2] = {q2[47:32], q2[31:16]};
endmodule
