// ctrl_vme: VME register space of the Control FPGA.
// Same register bus as the DataIO FPGAs (read data one cycle after `rd`,
// with `rvalid`). Decoded here (address bits 19..18 are 00):
//   0x00 firmware version 0x0C710090 (R)   0x04 reset (W, one-cycle pulse)
//   0x08 DAQ SW version (R/W)              0x0C control 1: bunch count shift 7:0 (41)
//   0x10 status 1 = 0x00C0FFEE (R)         0x14 pulse 1 (W, unused)
//   0x18 control 2: ignore aborts, bit 0 (1)
//   0x1C control 3: word count max 29:20 (1023), timer delay 19:0 (16)
//   0x20 status 2 = 0xDEADBEEF (R)
//   0x24 state 1 = {2'b0, word count reg 1, word count reg 0, current count}
//   0x28 state 2 = {4'b0, timer enables 3:0, event count, total >= max,
//                   overflow, word count reg 3, word count reg 2}
//   0x100000-0x10007C IDPROM (R, byte in bits 31:24), read through ports
//   0x800 + 0x100*b (+4 for DAQ RAM 2): word count register of buffer b
//   bit 23 = 1, bit 22 = 0: DAQ RAM readout, bits 21:20 buffer, bit 17 RAM,
//   bits 10:2 word. DAQ RAM 2 is unused and reads as zero.
// Register map and power-up values are the board's; the bus abstraction and
// the IDPROM port (its contents are board data kept outside) are this
// design's own. The soft reset does not clear these registers.
module ctrl_vme (
  input  logic        clk,
  input  logic        rst,
  input  xft_pkg::vme_req_t req,
  output logic [31:0] rdata,
  output logic        rvalid,
  output logic        soft_reset,
  output logic [7:0]  bc_shift,
  output logic        ignore_abort,
  output logic [9:0]  wc_max,
  output logic [19:0] num_ticks,
  // overflow detector state
  input  logic [9:0]  cur_wc,
  input  logic [9:0]  wc_reg [4],
  input  logic [3:0]  timer_en,
  input  logic [1:0]  event_cnt,
  input  logic        ge_max,
  input  logic        overflow,
  // output DAQ RAM 1
  output logic [10:0] ram_raddr,
  input  logic [31:0] ram_rdata,
  input  logic [9:0]  ram_wc [4],
  // IDPROM
  output logic [4:0]  idprom_addr,
  input  logic [7:0]  idprom_data
);
  import xft_pkg::*;
  logic [31:0] daq_sw;
  typedef enum logic [1:0] {SEL_REG, SEL_RAM, SEL_PROM, SEL_ZERO} sel_t;
  sel_t sel;
  logic [31:0] reg_q;

  logic is_ram, is_wc, is_reg, is_prom;
  assign is_ram  = req.addr[23] && !req.addr[22];
  assign is_prom = (req.addr[23:20] == 4'h1) && (req.addr[19:7] == '0);
  assign is_wc   = (req.addr[23:20] == 4'h0) && (req.addr[11:10] == 2'b10);
  assign is_reg  = (req.addr[23:20] == 4'h0) && (req.addr[11:8] == 4'h0);
  assign ram_raddr   = {req.addr[21:20], req.addr[10:2]};
  assign idprom_addr = req.addr[6:2];

  always_ff @(posedge clk) begin
    if (rst) begin
      daq_sw <= '0; bc_shift <= BC_SHIFT_DEFAULT; ignore_abort <= IGNORE_ABORT_DEF;
      wc_max <= WC_MAX_DEFAULT; num_ticks <= TIMER_DEFAULT;
      soft_reset <= 1'b0; rvalid <= 1'b0; sel <= SEL_ZERO; reg_q <= '0;
    end else begin
      soft_reset <= 1'b0;
      rvalid <= req.rd;
      if (req.wr && is_reg) begin
        unique case (req.addr[7:0])
          8'h04: soft_reset <= 1'b1;
          8'h08: daq_sw <= req.wdata;
          8'h0C: bc_shift <= req.wdata[7:0];
          8'h18: ignore_abort <= req.wdata[0];
          8'h1C: begin wc_max <= req.wdata[29:20]; num_ticks <= req.wdata[19:0]; end
          default: ;
        endcase
      end
      if (req.rd) begin
        sel <= SEL_REG; reg_q <= '0;
        if (is_ram) sel <= req.addr[17] ? SEL_ZERO : SEL_RAM;
        else if (is_prom) sel <= SEL_PROM;
        else if (is_wc) reg_q <= req.addr[2] ? '0 : {22'b0, ram_wc[req.addr[9:8]]};
        else if (is_reg) begin
          unique case (req.addr[7:0])
            8'h00: reg_q <= CTRL_FW_VERSION;
            8'h08: reg_q <= daq_sw;
            8'h0C: reg_q <= {24'b0, bc_shift};
            8'h10: reg_q <= STATUS1_VALUE;
            8'h18: reg_q <= {31'b0, ignore_abort};
            8'h1C: reg_q <= {2'b0, wc_max, num_ticks};
            8'h20: reg_q <= CTRL_STATUS2;
            8'h24: reg_q <= {2'b0, wc_reg[1], wc_reg[0], cur_wc};
            8'h28: reg_q <= {4'b0, timer_en, event_cnt, ge_max, overflow, wc_reg[3], wc_reg[2]};
            default: reg_q <= '0;
          endcase
        end
      end
    end
  end

  logic [7:0] prom_q;
  always_ff @(posedge clk) prom_q <= idprom_data;

  always_comb begin
    unique case (sel)
      SEL_RAM:  rdata = ram_rdata;
      SEL_PROM: rdata = {prom_q, 24'b0};
      SEL_REG:  rdata = reg_q;
      default:  rdata = '0;
    endcase
  end
endmodule
