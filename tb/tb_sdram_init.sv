// tb_sdram_init: records the command sequence of the initialisation module and
// checks it against the power-up procedure: PWRUP NOP cycles, PRECHARGE ALL,
// T_RP later the first of 8 AUTO REFRESH commands T_RFC apart, then LOAD MODE
// REGISTER, and init_done T_MRD after it.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_sdram_init;
  import daq_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init_done;
  sd_cmd_e cmd;
  asel_e asel;
  always #5 clk = ~clk;
  sdram_init #(.PWRUP(40), .N_REF(8), .T_RP(2), .T_RFC(7), .T_MRD(2)) dut (.clk, .rst_n, .cmd, .asel, .init_done);
  `WATCHDOG(clk, 500)
  int cyc = 0, t_pre = -1, t_lmr = -1, t_done = -1;
  int t_ref [$];
  always @(posedge clk) if (rst_n) begin
    if (cmd == CMD_PRECHARGE) begin t_pre = cyc; `CHECK(asel == ASEL_PALL, "precharge all") end
    if (cmd == CMD_REFRESH) t_ref.push_back(cyc);
    if (cmd == CMD_LMR) begin t_lmr = cyc; `CHECK(asel == ASEL_MODE, "mode word on LMR") end
    if (init_done && t_done < 0) t_done = cyc;
    cyc++;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    wait (init_done); repeat (3) @(negedge clk);
    `CHECK(t_pre == 40, $sformatf("precharge after 40 power-up cycles (%0d)", t_pre))
    `CHECK(t_ref.size() == 8, "8 refreshes")
    `CHECK(t_ref[0] == t_pre + 2, "tRP before first refresh")
    for (int i = 1; i < t_ref.size(); i++) `CHECK(t_ref[i] - t_ref[i-1] == 7, "tRFC between refreshes")
    `CHECK(t_lmr == t_ref[7] + 7, "LMR tRFC after last refresh")
    `CHECK(t_done == t_lmr + 2, "done tMRD after LMR")
    `CHECK(cmd == CMD_NOP, "NOP once done")
    `TB_DONE
  end
endmodule
