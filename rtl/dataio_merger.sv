// dataio_merger: Merger State Machine of a DataIO FPGA.
// Visits the six channel output FIFOs in order (mezzanine 1 channels 1-3, then
// mezzanine 2 channels 1-3). A channel whose enable bit is low is skipped.
// For an enabled channel it pops words as they become available and passes
// them on until it has passed the channel's end-of-event word, then moves to
// the next channel; after channel 6 it starts over. `out_last` marks the end
// word of the last enabled channel, where the event ends.
// Interface: show-ahead FIFO ports per channel; one output word per cycle,
// held off while `out_ready` is low. The channel order, skipping of disabled
// channels and the state names follow the board's merger; with show-ahead
// FIFOs the fill-level tests of the original are not needed (own choice).
// With all six channels disabled the merger only circles (as on the board,
// that setting is not supported).
module dataio_merger (
  input  logic        clk,
  input  logic        rst,
  input  logic [5:0]  chan_en,
  input  logic [5:0]  f_empty,
  input  logic [5:0]  f_eoe,
  input  logic [31:0] f_data [6],
  output logic [5:0]  f_rd,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        out_valid,
  output logic        out_last
);
  typedef enum logic [1:0] {NULL_S, ENCHECK_S, CHECK_S, EOE_S} mst_t;
  mst_t st;
  logic [2:0] ch;
  logic take;
  logic [5:0] later;     // channels after the current one

  assign later = 6'(6'b111111 << (ch + 3'd1));
  assign take  = (st == CHECK_S) && !f_empty[ch] && out_ready;

  always_comb begin
    f_rd = '0;
    if (take) f_rd[ch] = 1'b1;
  end
  assign out_valid = take;
  assign out_data  = f_data[ch];
  assign out_last  = take && f_eoe[ch] && ((chan_en & later) == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= NULL_S; ch <= '0;
    end else begin
      unique case (st)
        NULL_S: begin ch <= '0; st <= ENCHECK_S; end
        ENCHECK_S:
          if (chan_en[ch]) st <= CHECK_S;
          else if (ch == 3'd5) st <= NULL_S;
          else ch <= ch + 3'd1;
        CHECK_S: if (take && f_eoe[ch]) st <= EOE_S;
        EOE_S:
          if (ch == 3'd5) st <= NULL_S;
          else begin ch <= ch + 3'd1; st <= ENCHECK_S; end
        default: st <= NULL_S;
      endcase
    end
  end
endmodule
