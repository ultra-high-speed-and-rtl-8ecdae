// tb_sdram_addr_sel: checks the pin register: each slot reaches the pins one
// clock later with the address the asel field chooses (row, column with A10,
// mode word, A10 for precharge all), write data and its enable, and that the
// data pins are captured into dq_q one clock later; NOP with CKE low in reset.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_sdram_addr_sel;
  import daq_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  sd_slot_t slot;
  logic [12:0] mode_word = 13'h033;
  logic [31:0] dq_q, sd_dq_o, sd_dq_i = 0;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [1:0] sd_ba; logic [12:0] sd_a; logic [3:0] sd_dqm;
  sdram_addr_sel dut (.clk, .rst_n, .slot, .mode_word, .dq_q, .sd_cke, .sd_cs_n, .sd_ras_n,
    .sd_cas_n, .sd_we_n, .sd_ba, .sd_a, .sd_dqm, .sd_dq_o, .sd_dq_oe, .sd_dq_i);
  `WATCHDOG(clk, 1000)
  task automatic drive(input sd_cmd_e c, input asel_e s, input logic [24:0] lin, input logic drv, input logic [31:0] d);
    @(negedge clk);
    slot = '{cmd: c, asel: s, addr: sd_addr_t'(lin), drive: drv, wdata: d};
    @(negedge clk);
  endtask
  initial begin
    slot = '{cmd: CMD_NOP, asel: ASEL_NONE, addr: '0, drive: 0, wdata: 0};
    @(negedge clk);
    `CHECK({sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} == 4'b0111 && !sd_cke && sd_dqm == 4'hF, "reset: NOP, CKE low")
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (50) begin
      logic [24:0] lin;
      logic [31:0] d;
      lin = 25'($urandom);
      d   = $urandom;
      drive(CMD_ACTIVE, ASEL_ROW, lin, 0, d);
      `CHECK({sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} == 4'b0011 && sd_a == lin[24:12] && sd_ba == lin[11:10], "ACTIVE row")
      drive(CMD_WRITE, ASEL_COL, lin, 1, d);
      `CHECK({sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} == 4'b0100 && sd_a == {2'b00, 1'b1, lin[9:0]} && sd_ba == lin[11:10], "WRITE column + A10")
      `CHECK(sd_dq_oe && sd_dq_o == d && sd_dqm == 0 && sd_cke, "write data driven")
      drive(CMD_LMR, ASEL_MODE, lin, 0, d);
      `CHECK(sd_a == 13'h033 && sd_ba == 0 && !sd_dq_oe, "mode word")
      drive(CMD_PRECHARGE, ASEL_PALL, lin, 0, d);
      `CHECK(sd_a == 13'h400 && {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} == 4'b0010, "precharge all")
      sd_dq_i = d ^ 32'hFFFF_0000; @(negedge clk);
      `CHECK(dq_q == (d ^ 32'hFFFF_0000), "read data registered")
    end
    `TB_DONE
  end
endmodule
