// tb_sdram_refresh: checks one refresh is owed per T_REFI cycles once enabled,
// none before, that owed refreshes accumulate when not served (up to MAX_OWED)
// and that each acknowledge pays one back.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_sdram_refresh;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enable = 0, ref_ack = 0, ref_req;
  always #5 clk = ~clk;
  sdram_refresh #(.T_REFI(20), .MAX_OWED(3)) dut (.clk, .rst_n, .enable, .ref_ack, .ref_req);
  `WATCHDOG(clk, 1000)
  int first = -1;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (50) @(negedge clk);
    `CHECK(!ref_req, "no refresh before enable")
    enable = 1;
    for (int i = 1; i <= 25; i++) begin @(negedge clk); if (ref_req && first < 0) first = i; end
    `CHECK(first == 20, $sformatf("first request after 20 cycles (%0d)", first))
    // serve it immediately, next in 20
    ref_ack = 1; @(negedge clk); ref_ack = 0;
    `CHECK(!ref_req, "served")
    repeat (200) @(negedge clk);       // 10 intervals, capped at 3 owed
    for (int i = 0; i < 3; i++) begin
      `CHECK(ref_req, $sformatf("owed refresh %0d", i))
      ref_ack = 1; @(negedge clk); ref_ack = 0;
    end
    `CHECK(!ref_req, "cap of 3 owed")
    `TB_DONE
  end
endmodule
