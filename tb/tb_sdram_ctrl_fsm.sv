// tb_sdram_ctrl_fsm: drives the central controller directly. Checks that the
// initialisation commands pass through until init_done; that with refresh,
// mode load, write and read all pending they are served in that order; the
// write burst slot sequence (ACTIVE, WRITE with data T_RCD later, 8 beats,
// next command T_WR+T_RP after the last beat); and that read beats are taken
// from dq_q exactly cas_lat+2+i cycles after the READ slot, for latency 2 and 3.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_sdram_ctrl_fsm;
  import daq_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  sd_cmd_e init_cmd = CMD_PRECHARGE;
  asel_e init_asel = ASEL_PALL;
  logic init_done = 0, ref_req = 0, lmr_req = 0, wr_req = 0, rd_req = 0;
  logic [1:0] cas_lat = 2;
  sd_addr_t wr_addr = sd_addr_t'(25'h0ABC8), rd_addr = sd_addr_t'(25'h1_2340);
  logic [31:0] wr_data, rd_data, dq_q;
  logic ref_ack, lmr_issued, wr_beat, wr_done, rd_grant, rd_beat;
  sd_slot_t slot;
  sdram_ctrl_fsm dut (.clk, .rst_n, .init_cmd, .init_asel, .init_done, .ref_req, .ref_ack,
    .lmr_req, .lmr_issued, .cas_lat, .wr_req, .wr_addr, .wr_data, .wr_beat, .wr_done,
    .rd_req, .rd_addr, .rd_grant, .rd_beat, .rd_data, .dq_q, .slot);
  `WATCHDOG(clk, 3000)
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign dq_q = 32'(cyc) * 32'h01010101;     // data tagged with the cycle
  int nbeat = 0;
  assign wr_data = 32'hD000_0000 + 32'(nbeat);
  always @(posedge clk) if (wr_beat) nbeat <= nbeat + 1;

  sd_cmd_e order [$];
  int t_cmd [$];
  always @(posedge clk) if (rst_n && init_done && slot.cmd != CMD_NOP) begin order.push_back(slot.cmd); t_cmd.push_back(cyc); end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    `CHECK(slot.cmd == CMD_PRECHARGE && slot.asel == ASEL_PALL, "init command passed through")
    init_cmd = CMD_LMR; init_asel = ASEL_MODE; #1;
    `CHECK(slot.cmd == CMD_LMR && lmr_issued, "init LMR flagged")
    @(negedge clk); init_cmd = CMD_NOP; init_done = 1;
    @(negedge clk); @(negedge clk);
    // everything pending at once
    ref_req = 1; lmr_req = 1; wr_req = 1; rd_req = 1;
    fork
      forever begin @(posedge clk); if (ref_ack) ref_req <= 0; if (lmr_issued) lmr_req <= 0; if (wr_done) wr_req <= 0; if (rd_grant) rd_req <= 0; end
    join_none
    repeat (60) @(negedge clk);
    `CHECK(order.size() == 6, $sformatf("6 commands, got %0d", order.size()))
    `CHECK(order[0] == CMD_REFRESH && order[1] == CMD_LMR && order[2] == CMD_ACTIVE && order[3] == CMD_WRITE
           && order[4] == CMD_ACTIVE && order[5] == CMD_READ, "order refresh, mode, write, read")
    `CHECK(t_cmd[1] - t_cmd[0] == 7 && t_cmd[2] - t_cmd[1] == 2, "tRFC and tMRD")
    `CHECK(t_cmd[3] - t_cmd[2] == 2, "tRCD before WRITE")
    `CHECK(t_cmd[4] - t_cmd[3] == 7 + 4 + 1, "last beat + tWR + tRP before next ACTIVE")
    `CHECK(t_cmd[5] - t_cmd[4] == 2, "tRCD before READ")
    `CHECK(nbeat == 8, "8 write beats")
    disable fork;
    // read beat timing for both latencies
    for (int cl = 2; cl <= 3; cl++) begin
      int got, t_rd;
      got = 0; t_rd = -1;
      cas_lat = 2'(cl);
      @(negedge clk); rd_req = 1;
      @(negedge clk); rd_req = 0;
      repeat (25) begin
        @(posedge clk);
        if (slot.cmd == CMD_READ) t_rd = cyc;
        if (rd_beat) begin
          `CHECK(cyc == t_rd + cl + 2 + got, $sformatf("CL%0d beat %0d at READ+%0d", cl, got, cyc - t_rd))
          `CHECK(rd_data == 32'(cyc) * 32'h01010101, "beat taken from dq_q")
          got++;
        end
      end
      `CHECK(got == 8, $sformatf("8 read beats at CL%0d", cl))
    end
    `CHECK(slot.addr == rd_addr, "burst address held")
    `TB_DONE
  end
endmodule
