// slink_if: S-LINK Interface of the Control FPGA.
// Drains the Output FIFO one event at a time and sends it in the Pulsar
// S-LINK format on two identical S-LINK ports:
//   BOF 0xB0F00000 (control) | header 1 | header 2 | event words | trailer |
//   EOF 0xE0F00000 (control)
// header 1 = {format 31:24, source 23:20, region 19:18, 8'b0, bunch count 9:2,
//             L2 buffer 1:0}; header 2 = {16'b0, latency}; trailer =
// {data size 31:16, error flags 15:0} with bit 0 abort, bit 1 truncation,
// bit 2 "ignoring aborts". Every word is also written to output DAQ RAM 1
// (2048 words, 512 per buffer), whose buffer starts with the DAQ header word
// {board type 31:23, serial 22:13, geographical address 12:8 (0), bunch count
// 7:0}; each buffer's word count register holds the number of words written.
// An event starts when its first word is in the Output FIFO; bunch count,
// buffer and L1A time stamp come from the bunch counter's event FIFO; the
// error flags from the overflow detector. One word per clock, no back
// pressure. Word formats are the board's. Own choices: latency = 100 ns ticks
// from L1A to the BOF; data size = number of event words between header 2
// and the trailer; format, source, region and serial are parameters that
// default to 0; words beyond a buffer's 512 are not stored.
module slink_if #(
  parameter logic [7:0] FORMAT = 8'h00,
  parameter logic [3:0] SOURCE = 4'h0,
  parameter logic [1:0] REGION = 2'h0,
  parameter logic [9:0] SERIAL = 10'h000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ignore_abort,
  input  logic [15:0] tick,
  // Output FIFO {last, data}
  input  logic        of_empty,
  input  logic [32:0] of_q,
  output logic        of_rd,
  // event info from the bunch counter
  input  logic        ev_empty,
  input  logic [7:0]  ev_bc,
  input  logic [1:0]  ev_buf,
  input  logic [15:0] ev_tick,
  output logic        ev_rd,
  // error flags from the overflow detector
  input  logic        fl_empty,
  input  logic [15:0] fl_q,
  output logic        fl_rd,
  // S-LINK ports
  output xft_pkg::slink_t slink1,
  output xft_pkg::slink_t slink2,
  // DAQ RAM readout
  input  logic [10:0] ram_raddr,
  output logic [31:0] ram_rdata,
  output logic [9:0]  wc [4]
);
  import xft_pkg::*;
  typedef enum logic [2:0] {IDLE_S, BOF_S, H1_S, H2_S, DATA_S, TRAILER_S, EOF_S} sst_t;
  sst_t st;
  logic [15:0] size;
  logic [9:0]  ptr;      // next free word in the buffer, 0..512
  slink_t o;
  logic ram_we;
  logic [31:0] ram_wd;
  logic start;

  daq_ram #(.WIDTH(32), .DEPTH(2048)) u_ram (
    .clk, .we(ram_we), .waddr({ev_buf, start ? 9'd0 : ptr[8:0]}), .wdata(ram_wd),
    .raddr(ram_raddr), .rdata(ram_rdata));

  always_comb begin
    o = '0; of_rd = 1'b0; ev_rd = 1'b0; fl_rd = 1'b0;
    unique case (st)
      BOF_S: begin o.data = SLINK_BOF; o.write = 1'b1; o.control = 1'b1; end
      H1_S:  begin o.data = {FORMAT, SOURCE, REGION, 8'b0, ev_bc, ev_buf}; o.write = 1'b1; end
      H2_S:  begin o.data = {16'b0, tick - ev_tick}; o.write = 1'b1; end
      DATA_S: if (!of_empty) begin o.data = of_q[31:0]; o.write = 1'b1; of_rd = 1'b1; end
      TRAILER_S: if (!fl_empty) begin
        o.data = {size, fl_q[15:3], ignore_abort, fl_q[1:0]}; o.write = 1'b1; fl_rd = 1'b1;
      end
      EOF_S: begin o.data = SLINK_EOF; o.write = 1'b1; o.control = 1'b1; ev_rd = 1'b1; end
      default: ;
    endcase
  end

  assign start = (st == IDLE_S) && !of_empty && !ev_empty;
  assign ram_we = start || (o.write && !ptr[9]);
  assign ram_wd = start ? {BOARD_TYPE, SERIAL, 5'b0, ev_bc} : o.data;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE_S; size <= '0; ptr <= '0; slink1 <= '0; slink2 <= '0;
      for (int b = 0; b < 4; b++) wc[b] <= '0;
    end else begin
      slink1 <= o; slink2 <= o;
      if (o.write && !ptr[9]) ptr <= ptr + 10'd1;
      unique case (st)
        IDLE_S: if (start) begin ptr <= 10'd1; size <= '0; st <= BOF_S; end
        BOF_S:  st <= H1_S;
        H1_S:   st <= H2_S;
        H2_S:   st <= DATA_S;
        DATA_S: if (!of_empty) begin
          size <= size + 16'd1;
          if (of_q[32]) st <= TRAILER_S;
        end
        TRAILER_S: if (!fl_empty) st <= EOF_S;
        EOF_S: begin
          wc[ev_buf] <= ptr[9] ? ptr : ptr + 10'd1;
          st <= IDLE_S;
        end
        default: st <= IDLE_S;
      endcase
    end
  end
endmodule
