// dataio_vme: VME register space of a DataIO FPGA.
// The VME bus is represented by a simple synchronous register bus (address
// bits 23..0, read and write strobes, write data); read data is valid one
// cycle after the read strobe, with `rvalid`. Bits 19..18 select the FPGA and
// are decoded outside. Decoded here:
//   0x00 firmware version (R)         0x04 reset (W, one-cycle soft reset)
//   0x08 DAQ SW version (R/W)         0x0C control 1: channel enables 5:0 (R/W, 0x3F)
//   0x10 status 1 = 0x00C0FFEE (R)    0x14 pulse 1 (W, unused)
//   0x18 control 2 (R/W, unused)      0x1C control 3 (R/W, unused)
//   0x20 status 2 = 0x00000CDF (R)
//   0x800 + 0x100*b (+4 for DAQ RAM 2): word count register of buffer b
//   bit 23 = 1, bit 22 = 0: DAQ RAM readout; bits 21:20 buffer, bit 17 RAM
// In the DAQ RAM 1 window, address bits 11:2 index the buffer's words with
// bits 11:9 the channel (0-5) and 8:2 the word of that channel's 128-word
// buffer. DAQ RAM 2 is not used on this board and reads as zero, as does its
// word count. The word count register of DAQ RAM 1 is the sum of the six
// channel counts. The soft reset does not clear these registers.
// Register map and reset values are the board's; the bus abstraction, the
// channel window layout and the word count sum are this design's own.
module dataio_vme (
  input  logic        clk,
  input  logic        rst,
  input  xft_pkg::vme_req_t req,
  output logic [31:0] rdata,
  output logic        rvalid,
  output logic        soft_reset,
  output logic [5:0]  chan_en,
  // DAQ RAM readout (shared address to all six channel RAMs)
  output logic [8:0]  ram_raddr,
  input  logic [31:0] ram_rdata [6],
  input  logic [xft_pkg::WCW-1:0] wc [6][4]
);
  import xft_pkg::*;
  logic [31:0] daq_sw, cr2, cr3;

  typedef enum logic [1:0] {SEL_REG, SEL_RAM, SEL_ZERO} sel_t;
  sel_t sel;
  logic [31:0] reg_q;
  logic [2:0]  ch_q;

  logic is_ram, is_wc, is_reg;
  assign is_ram = req.addr[23] && !req.addr[22];
  assign is_wc  = (req.addr[23:20] == 4'h0) && (req.addr[11:10] == 2'b10);
  assign is_reg = (req.addr[23:20] == 4'h0) && (req.addr[11:8] == 4'h0);
  assign ram_raddr = {req.addr[21:20], req.addr[8:2]};

  function automatic logic [31:0] wc_sum(input logic [1:0] b);
    logic [31:0] s = '0;
    for (int i = 0; i < 6; i++) s += 32'(wc[i][b]);
    return s;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      daq_sw <= '0; cr2 <= '0; cr3 <= '0; chan_en <= CHAN_EN_DEFAULT;
      soft_reset <= 1'b0; rvalid <= 1'b0; sel <= SEL_ZERO; reg_q <= '0; ch_q <= '0;
    end else begin
      soft_reset <= 1'b0;
      rvalid <= req.rd;
      if (req.wr && is_reg) begin
        unique case (req.addr[7:0])
          8'h04: soft_reset <= 1'b1;
          8'h08: daq_sw <= req.wdata;
          8'h0C: chan_en <= req.wdata[5:0];
          8'h18: cr2 <= req.wdata;
          8'h1C: cr3 <= req.wdata;
          default: ;
        endcase
      end
      if (req.rd) begin
        sel <= SEL_REG; reg_q <= '0; ch_q <= req.addr[11:9];
        if (is_ram) sel <= (!req.addr[17] && req.addr[11:9] < 3'd6) ? SEL_RAM : SEL_ZERO;
        else if (is_wc) reg_q <= req.addr[2] ? '0 : wc_sum(req.addr[9:8]);
        else if (is_reg) begin
          unique case (req.addr[7:0])
            8'h00: reg_q <= DIO_FW_VERSION;
            8'h08: reg_q <= daq_sw;
            8'h0C: reg_q <= {26'b0, chan_en};
            8'h10: reg_q <= STATUS1_VALUE;
            8'h18: reg_q <= cr2;
            8'h1C: reg_q <= cr3;
            8'h20: reg_q <= DIO_STATUS2;
            default: reg_q <= '0;
          endcase
        end
      end
    end
  end

  always_comb begin
    unique case (sel)
      SEL_RAM: rdata = ram_rdata[ch_q];
      SEL_REG: rdata = reg_q;
      default: rdata = '0;
    endcase
  end
endmodule
