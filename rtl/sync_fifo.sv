// sync_fifo: show-ahead synchronous FIFO.
// The word at the head is on rd_data whenever empty is low; rd_en pops it.
// A write to a full FIFO is ignored and a read of an empty one does nothing.
// usedw counts the stored words (0..DEPTH). Writing and reading in the same
// cycle is allowed in any fill state except a write when full.
// The board uses FIFOs of many sizes (32x16 input FIFOs, 256/512x32 output
// FIFOs, 16-entry L1A FIFO, 512x32 and 2048x32 in the Control FPGA); this one
// module serves them all. The show-ahead behaviour and the flag timing are
// this design's own choice.
module sync_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 16,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      usedw
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_wr, do_rd;

  assign empty = (usedw == '0);
  assign full  = (usedw == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; usedw <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      usedw <= usedw + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
endmodule
