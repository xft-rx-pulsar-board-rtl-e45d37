// tb_util.svh: check counting and result reporting shared by the testbenches.
// Each testbench declares `int checks, failures;` and a clock `clk`.
`define CHK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end end
`define FINISH \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define WATCHDOG(n) \
  initial begin repeat (n) @(posedge clk); failures++; $display("FAIL watchdog"); `FINISH end
