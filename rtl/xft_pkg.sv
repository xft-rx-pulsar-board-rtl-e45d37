// xft_pkg: constants and types shared by the XFT Rx Pulsar board logic.
// Holds the S-LINK control words, the abort word, the register constants of
// the three FPGAs (firmware versions, fixed status words), the board type and
// the bundles that run between the DataIO FPGAs and the Control FPGA.
// The numeric values are those of the board's register and S-LINK tables;
// the struct layouts are this design's own grouping of the wires.
package xft_pkg;

  // S-LINK control words and the single word sent for an aborted event
  localparam logic [31:0] SLINK_BOF  = 32'hB0F0_0000;
  localparam logic [31:0] SLINK_EOF  = 32'hE0F0_0000;
  localparam logic [31:0] ABORT_WORD = 32'hC000_C000;

  // Board type "L2 Pulsar Stereo Rx (XFT Rx)"
  localparam logic [8:0]  BOARD_TYPE = 9'd102;

  // Register constants
  localparam logic [31:0] DIO_FW_VERSION  = 32'h0D70_5140;
  localparam logic [31:0] CTRL_FW_VERSION = 32'h0C71_0090;
  localparam logic [31:0] STATUS1_VALUE   = 32'h00C0_FFEE;
  localparam logic [31:0] DIO_STATUS2     = 32'h0000_0CDF;
  localparam logic [31:0] CTRL_STATUS2    = 32'hDEAD_BEEF;

  // Power-up values of the control registers
  localparam logic [5:0]  CHAN_EN_DEFAULT   = 6'h3F;
  localparam logic [7:0]  BC_SHIFT_DEFAULT  = 8'd41;
  localparam logic        IGNORE_ABORT_DEF  = 1'b1;
  localparam logic [9:0]  WC_MAX_DEFAULT    = 10'd1023;
  localparam logic [19:0] TIMER_DEFAULT     = 20'd16;

  // Width of one Finder channel word count (fits a 128-word DAQ RAM buffer)
  localparam int WCW = 7;

  // One DataIO -> Control FPGA link: data, data strobe, Data EOE, two word count strobes
  typedef struct packed {
    logic [31:0] data;
    logic        strobe;    // data word valid
    logic        eoe;       // data EOE: last word of the last channel (sent twice)
    logic        wc_strobe0; // word count word 1 on data
    logic        wc_strobe1; // word count word 2 on data
  } dio_link_t;

  // One S-LINK output port
  typedef struct packed {
    logic [31:0] data;
    logic        write;
    logic        control;   // high for the BOF and EOF control words
  } slink_t;

  // Simple register bus standing in for the VME slave interface
  typedef struct packed {
    logic [23:0] addr;      // VME address bits 23..0 (31..24 are not decoded)
    logic        wr;
    logic        rd;
    logic [31:0] wdata;
  } vme_req_t;

endpackage
