// daq_ram: DAQ RAM, a simple dual-port memory split into four buffers.
// The upper two address bits are the L2 buffer number, so the RAM holds four
// equal buffers of DEPTH/4 words. The write port is driven by the event logic,
// the read port by the VME interface; reads are synchronous (data one cycle
// after the address). Sizes follow the board: 512 words per Finder channel in
// a DataIO FPGA, 2048 words in the Control FPGA. The per-buffer word count
// registers live with the logic that fills the RAM.
module daq_ram #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 512,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
