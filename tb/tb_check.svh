// tb_check.svh: shared check counter for the self-checking testbenches.
// CHECK(cond, message) counts one check and, if cond is false, one failure.
// TB_DONE prints the result line and ends the simulation.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(c, m) begin checks++; if (!(c)) begin failures++; $display("FAIL: %s", m); end end
`define TB_DONE begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define WATCHDOG(clk, n) initial begin repeat (n) @(posedge clk); failures++; $display("watchdog expired"); `TB_DONE end
`endif
