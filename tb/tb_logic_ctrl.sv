// tb_logic_ctrl: register file on its own. Checks write/read-back of every
// setting register and its outputs, that arming flips the arm toggle and
// clears the SDRAM write pointer, the mode-register write strobe, that a
// readback start loads address and length, the STATUS bits including "record
// stored", and the DATA port: it waits for the readback FIFO, returns its
// words in order and returns 0 when no readback runs.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_logic_ctrl;
  import daq_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sys_req = 0, sys_we = 0, sys_ack;
  logic [11:0] sys_addr = 0;
  logic [31:0] sys_wdata = 0, sys_rdata, rec_len;
  logic arm_tgl, dual, ch_single, acq_busy = 0, acq_done = 0, acq_ovf = 0, acq_ch = 0;
  logic [12:0] fifo_count = 0;
  logic [7:0] relay; logic [11:0] offset_ch1, offset_ch2, trig_level;
  logic mode_wr, wr_clear, rd_load, rb_pop, rb_empty, rd_busy = 0, init_done = 1;
  logic [1:0] mode_wdata, cas_lat = 2;
  logic [24:0] rd_start; logic [25:0] rd_len, wr_beats = 26'd96;
  logic [31:0] rb_data;
  logic_ctrl dut (.clk, .rst_n, .sys_req, .sys_we, .sys_addr, .sys_wdata, .sys_ack, .sys_rdata,
    .arm_tgl, .dual, .ch_single, .rec_len, .acq_busy, .acq_done, .acq_ovf, .acq_ch, .fifo_count,
    .relay, .offset_ch1, .offset_ch2, .trig_level, .mode_wr, .mode_wdata, .wr_clear, .rd_load,
    .rd_start, .rd_len, .rb_pop, .rb_data, .rb_empty, .rd_busy, .init_done, .wr_beats, .cas_lat);
  `WATCHDOG(clk, 3000)
  // readback FIFO stand-in
  logic [31:0] rbq [$];
  assign rb_empty = (rbq.size() == 0);
  always @(posedge clk) if (rb_pop && rbq.size() > 0) rb_data <= rbq.pop_front();
  int n_clear = 0, n_mode = 0, n_load = 0;
  always @(posedge clk) begin n_clear += int'(wr_clear); n_mode += int'(mode_wr); n_load += int'(rd_load); end

  task automatic acc(input logic we, input logic [7:0] a, input logic [31:0] d, output logic [31:0] r);
    @(negedge clk); sys_req = 1; sys_we = we; sys_addr = {4'h0, a}; sys_wdata = d;
    @(negedge clk); sys_req = 0;
    while (!sys_ack) @(negedge clk);
    r = sys_rdata;
  endtask

  logic [31:0] r;
  initial begin
    logic t0;
    repeat (2) @(negedge clk); rst_n = 1;
    acc(1, REG_REC_LEN, 32'd4096, r);   acc(0, REG_REC_LEN, 0, r);
    `CHECK(r == 4096 && rec_len == 4096, "record length")
    acc(1, REG_RELAY, 32'h5A, r);       acc(0, REG_RELAY, 0, r);
    `CHECK(r == 32'h5A && relay == 8'h5A, "relays")
    acc(1, REG_OFFSET, 32'h0123_0456, r); acc(0, REG_OFFSET, 0, r);
    `CHECK(r == 32'h0123_0456 && offset_ch1 == 12'h456 && offset_ch2 == 12'h123, "offset DACs")
    acc(1, REG_TRIG_LVL, 32'h9AB, r);   acc(0, REG_TRIG_LVL, 0, r);
    `CHECK(r == 32'h9AB && trig_level == 12'h9AB, "trigger level")
    acc(1, REG_SD_MODE, 3, r);
    `CHECK(n_mode == 1 && mode_wdata == 3, "mode write strobe")
    t0 = arm_tgl;
    acq_done = 1;                       // done of a previous record
    acc(1, REG_CTRL, 32'h7, r);         // arm, dual, CH2
    @(negedge clk);
    `CHECK(arm_tgl != t0 && n_clear == 1 && dual && ch_single, $sformatf("arm toggles and clears the write pointer %b %b %0d %b %b", arm_tgl, t0, n_clear, dual, ch_single))
    acc(0, REG_CTRL, 0, r);
    `CHECK(r == 32'h6, "control read back without the pulse bits")
    acc(0, REG_STATUS, 0, r);
    `CHECK(r[1] && !r[5], "done from the previous record is not 'stored' right after arm")
    acq_done = 0; repeat (2) @(negedge clk); acq_busy = 1; repeat (5) @(negedge clk);
    acq_busy = 0; acq_done = 1; acq_ovf = 1; acq_ch = 1; fifo_count = 4;
    acc(0, REG_STATUS, 0, r);
    `CHECK(r[0] == 0 && r[1] && r[2] && r[3] && r[4] && !r[5] && r[9:8] == 2, $sformatf("status %h", r))
    fifo_count = 0;
    acc(0, REG_STATUS, 0, r);
    `CHECK(r[5], "stored once the FIFO is drained")
    acc(0, REG_WR_COUNT, 0, r);
    `CHECK(r == 96, "write count")
    acc(1, REG_RD_ADDR, 32'h40, r); acc(1, REG_RD_LEN, 32'h10, r);
    acc(1, REG_CTRL, 32'h8, r);
    `CHECK(n_load == 1 && rd_start == 25'h40 && rd_len == 26'h10, "readback start")
    acc(0, REG_DATA, 0, r);
    `CHECK(r == 0, "no readback: DATA reads 0")
    rd_busy = 1;
    fork
      begin repeat (20) @(negedge clk); rbq.push_back(32'hCAFE0001); rbq.push_back(32'hCAFE0002); end
    join_none
    acc(0, REG_DATA, 0, r);
    `CHECK(r == 32'hCAFE0001, "DATA waits for the first beat")
    acc(0, REG_DATA, 0, r);
    `CHECK(r == 32'hCAFE0002, "second beat")
    `TB_DONE
  end
endmodule
