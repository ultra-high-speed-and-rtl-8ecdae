// tb_sdram_mode_reg: checks the mode word (burst 8, sequential, CAS latency in
// A[6:4]), that only latencies 2 and 3 are accepted, that a write after
// initialisation requests a LOAD MODE REGISTER, and that cas_lat changes only
// when that command is issued.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_sdram_mode_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr = 0, init_done = 0, lmr_issued = 0, lmr_req;
  logic [1:0] wdata = 0, cas_lat;
  logic [12:0] mode_word;
  always #5 clk = ~clk;
  sdram_mode_reg dut (.clk, .rst_n, .wr, .wdata, .init_done, .lmr_issued, .lmr_req, .mode_word, .cas_lat);
  `WATCHDOG(clk, 200)
  task automatic wr_cl(input logic [1:0] v);
    @(negedge clk); wr = 1; wdata = v; @(negedge clk); wr = 0;
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    `CHECK(mode_word == 13'h023 && cas_lat == 2 && !lmr_req, "reset word: CL2, BL8")
    wr_cl(3);
    `CHECK(mode_word == 13'h033 && !lmr_req, "CL3 before init: no request")
    @(negedge clk); lmr_issued = 1; @(negedge clk); lmr_issued = 0;
    `CHECK(cas_lat == 3, "init LMR applies CL3")
    init_done = 1;
    wr_cl(1);
    `CHECK(mode_word == 13'h033 && !lmr_req, "CL1 rejected")
    wr_cl(2);
    `CHECK(mode_word == 13'h023 && lmr_req && cas_lat == 3, "CL2 pending, LMR requested")
    repeat (3) @(negedge clk);
    `CHECK(lmr_req && cas_lat == 3, "request held")
    lmr_issued = 1; @(negedge clk); lmr_issued = 0;
    `CHECK(!lmr_req && cas_lat == 2, "LMR issued: CL2 in force")
    `TB_DONE
  end
endmodule
