// tb_sdram_addr_gen: checks the linear-to-{row, bank, column} split, burst
// steps of 8 beats, the write count, clearing on arm, read pointer load with
// burst alignment, and wrap-around at the top of the 2**25-beat memory.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_sdram_addr_gen;
  import daq_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_clear = 0, wr_adv = 0, rd_load = 0, rd_adv = 0;
  logic [24:0] rd_start = 0;
  sd_addr_t wr_addr, rd_addr;
  logic [25:0] wr_beats;
  always #5 clk = ~clk;
  sdram_addr_gen dut (.clk, .rst_n, .wr_clear, .wr_adv, .rd_load, .rd_start, .rd_adv, .wr_addr, .rd_addr, .wr_beats);
  `WATCHDOG(clk, 1000)
  initial begin
    int n;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      n = i * 8;
      `CHECK(wr_addr.col == 10'(n) && wr_addr.ba == 2'(n >> 10) && wr_addr.row == 13'(n >> 12), "write address split")
      `CHECK(wr_beats == 26'(n), "write beat count")
      wr_adv = 1; @(negedge clk); wr_adv = 0;
    end
    wr_clear = 1; @(negedge clk); wr_clear = 0;
    `CHECK(wr_addr == '0 && wr_beats == 0, "cleared on arm")
    rd_start = 25'h1FF_FFF5; rd_load = 1; @(negedge clk); rd_load = 0;
    `CHECK(rd_addr == sd_addr_t'(25'h1FF_FFF0), "read start aligned to a burst")
    rd_adv = 1; @(negedge clk);
    `CHECK(rd_addr == sd_addr_t'(25'h1FF_FFF8), "read advances 8")
    @(negedge clk); rd_adv = 0;
    `CHECK(rd_addr == '0, "read wraps at 128 MB")
    `TB_DONE
  end
endmodule
