// ctrl_merger: Merger State Machine of the Control FPGA.
// For each event it first waits for the event's abort decision (skipped when
// aborts are ignored), then reads input FIFO 1 (DataIO FPGA 1) up to its EOE
// word, drops the repeated EOE word, does the same with input FIFO 2, waits
// for the merged Finder word count words and sends them. Data words go out on
// `data_strobe` (through the FILAR Overflow Detector, which may mask them);
// the word count words and the abort word go out on `ctl_strobe`, which is
// never masked. `out_last` marks the event's final word. For an aborted event
// only 0xC000C000 is sent; the event's data and word counts are still read
// and discarded. `fod_eoe` tells the overflow detector the event's data have
// ended; `clear_ovf` is high while waiting for the next event, up to the
// arrival of its first data word. While aborts are ignored, arriving abort
// decisions are drained at once so that none is left over for a later event;
// a change of the ignore setting should be followed by a reset of the FPGA.
// States and their order follow the board's merger; the show-ahead FIFOs
// make the fill-level tests unnecessary (own choice).
module ctrl_merger (
  input  logic        clk,
  input  logic        rst,
  input  logic        ignore_abort,
  // abort FIFO
  input  logic        ab_empty,
  input  logic        ab_event,
  output logic        ab_rd,
  // input FIFOs {eoe, data}
  input  logic        f1_empty,
  input  logic [32:0] f1_q,
  output logic        f1_rd,
  input  logic        f2_empty,
  input  logic [32:0] f2_q,
  output logic        f2_rd,
  // Finder word count words
  input  logic        wc_empty,
  input  logic [31:0] wc_words [3],
  output logic        wc_rd,
  // towards the overflow detector and output FIFO
  output logic [31:0] out_data,
  output logic        data_strobe,
  output logic        ctl_strobe,
  output logic        out_last,
  output logic        fod_eoe,
  output logic        fod_abort,
  output logic        clear_ovf
);
  import xft_pkg::*;
  typedef enum logic [4:0] {
    NULL_S, WAIT_ABORT_S, WAIT2_ABORT_S, CHECK_ABORT_S, ABORT_WORD1_S, ABORT_WORD2_S,
    CHECK1_S, FIFO1EOE_S, CHECK2_S, FIFO2EOE_S, WAIT_WC_S,
    WC0_S, WC1_S, WC2_S, WC2_2_S, DELAYWC_S, DELAY1WC_S, DELAY2WC_S
  } cst_t;
  cst_t st;
  logic aborted;
  logic is_abort;
  logic started;     // a word of this event has been read from input FIFO 1

  assign is_abort = !ab_empty && ab_event && !ignore_abort;

  always_comb begin
    f1_rd = 1'b0; f2_rd = 1'b0; wc_rd = 1'b0;
    out_data = '0; data_strobe = 1'b0; ctl_strobe = 1'b0; out_last = 1'b0;
    fod_eoe = 1'b0; clear_ovf = 1'b0;
    unique case (st)
      NULL_S, WAIT_ABORT_S, WAIT2_ABORT_S: clear_ovf = 1'b1;
      CHECK_ABORT_S: clear_ovf = 1'b1;
      ABORT_WORD1_S: begin out_data = ABORT_WORD; ctl_strobe = 1'b1; out_last = 1'b1; end
      CHECK1_S: if (f1_empty) clear_ovf = !started; else begin
        f1_rd = 1'b1; out_data = f1_q[31:0]; data_strobe = !aborted;
      end
      FIFO1EOE_S: f1_rd = !f1_empty && f1_q[32];
      CHECK2_S: if (!f2_empty) begin
        f2_rd = 1'b1; out_data = f2_q[31:0]; data_strobe = !aborted;
      end
      FIFO2EOE_S: f2_rd = !f2_empty && f2_q[32];
      WC0_S: begin fod_eoe = 1'b1; out_data = wc_words[0]; ctl_strobe = !aborted; end
      WC1_S: begin out_data = wc_words[1]; ctl_strobe = !aborted; end
      WC2_S: begin
        out_data = wc_words[2]; ctl_strobe = !aborted; out_last = !aborted; wc_rd = 1'b1;
      end
      default: ;
    endcase
  end
  assign fod_abort = aborted;
  // one decision is used per event; while aborts are ignored they are drained
  assign ab_rd = !ab_empty && (ignore_abort || st == CHECK_ABORT_S);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= NULL_S; aborted <= 1'b0; started <= 1'b0;
    end else begin
      if (st == CHECK1_S && !f1_empty) started <= 1'b1;
      else if (st == NULL_S) started <= 1'b0;
      unique case (st)
        NULL_S:        st <= WAIT_ABORT_S;
        WAIT_ABORT_S:  if (!ab_empty || ignore_abort) st <= WAIT2_ABORT_S;
        WAIT2_ABORT_S: st <= CHECK_ABORT_S;
        CHECK_ABORT_S: begin
          aborted <= is_abort;
          st <= is_abort ? ABORT_WORD1_S : CHECK1_S;
        end
        ABORT_WORD1_S: st <= ABORT_WORD2_S;
        ABORT_WORD2_S: st <= CHECK1_S;
        CHECK1_S:   if (!f1_empty && f1_q[32]) st <= FIFO1EOE_S;
        FIFO1EOE_S: if (!f1_empty) st <= CHECK2_S;
        CHECK2_S:   if (!f2_empty && f2_q[32]) st <= FIFO2EOE_S;
        FIFO2EOE_S: if (!f2_empty) st <= WAIT_WC_S;
        WAIT_WC_S:  if (!wc_empty) st <= WC0_S;
        WC0_S:      st <= WC1_S;
        WC1_S:      st <= WC2_S;
        WC2_S:      st <= WC2_2_S;
        WC2_2_S:    st <= DELAYWC_S;
        DELAYWC_S:  st <= DELAY1WC_S;
        DELAY1WC_S: st <= DELAY2WC_S;
        DELAY2WC_S: st <= NULL_S;
        default:    st <= NULL_S;
      endcase
    end
  end
endmodule
