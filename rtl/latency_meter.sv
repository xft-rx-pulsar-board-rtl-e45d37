// latency_meter: time base for the L1A-to-data latency measurements.
// A free-running 16-bit tick counter advances once every TICK_CYCLES clock
// cycles, so one tick is 100 ns when TICK_CYCLES clock periods make 100 ns.
// Users stamp an L1A with the current tick and later subtract the stamp from
// the tick at the moment of interest; the difference is the latency in
// 100 ns units, modulo 2^16. The 100 ns unit is the board's; measuring by
// time stamps against one shared counter is this design's own choice.
// With the single 80 MHz (12.5 ns) clock used throughout, TICK_CYCLES = 8.
module latency_meter #(
  parameter int TICK_CYCLES = 8
) (
  input  logic        clk,
  input  logic        rst,
  output logic [15:0] tick
);
  localparam int PW = (TICK_CYCLES > 1) ? $clog2(TICK_CYCLES) : 1;
  logic [PW-1:0] pre;
  always_ff @(posedge clk) begin
    if (rst) begin
      pre  <= '0;
      tick <= '0;
    end else if (pre == PW'(TICK_CYCLES-1)) begin
      pre  <= '0;
      tick <= tick + 16'd1;
    end else begin
      pre <= pre + 1'b1;
    end
  end
endmodule
