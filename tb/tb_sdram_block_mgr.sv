// tb_sdram_block_mgr: checks the write side requests a burst only with 4 words
// waiting and hands out low half, high half and pops after the high half; the
// read side requests bursts only while beats remain and the readback FIFO has
// room for 8, stores returned beats and delivers them in order on rb_pop.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_sdram_block_mgr;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [63:0] fifo_rdata;
  logic [4:0]  fifo_count;
  logic fifo_rd_en, wr_req, wr_beat = 0, rd_req, rd_grant = 0, rd_beat = 0, rd_load = 0, rb_pop = 0;
  logic rb_empty, rd_busy;
  logic [31:0] wr_data, rd_data = 0, rb_data;
  logic [25:0] rd_len = 0;
  logic [4:0] rb_count;
  sdram_block_mgr #(.FIFO_AW(4), .RB_AW(4)) dut (.clk, .rst_n, .fifo_rdata, .fifo_count, .fifo_rd_en,
    .wr_req, .wr_beat, .wr_data, .rd_req, .rd_grant, .rd_beat, .rd_data,
    .rd_load, .rd_len, .rb_pop, .rb_data, .rb_empty, .rb_count, .rd_busy);
  `WATCHDOG(clk, 2000)
  int head = 0;
  assign fifo_rdata = {32'(2*head + 1), 32'(2*head)};
  always @(posedge clk) if (fifo_rd_en) head <= head + 1;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    fifo_count = 3; #1;
    `CHECK(!wr_req, "no write burst with 3 words")
    fifo_count = 4; #1;
    `CHECK(wr_req, "write burst with 4 words")
    for (int b = 0; b < 8; b++) begin
      @(negedge clk); wr_beat = 1; #1;
      `CHECK(wr_data == 32'(b), $sformatf("write beat %0d data", b))
      `CHECK(fifo_rd_en == b[0], "pop after high half")
    end
    @(negedge clk); wr_beat = 0;
    `CHECK(head == 4, "4 words consumed")
    // read side: 20 beats requested -> 16 (two bursts)
    rd_len = 20; rd_load = 1; @(negedge clk); rd_load = 0;
    `CHECK(rd_req && rd_busy, "read burst requested")
    for (int b = 0; b < 2; b++) begin
      `CHECK(rd_req, "room for a burst")
      rd_grant = 1; @(negedge clk); rd_grant = 0;
      for (int i = 0; i < 8; i++) begin rd_beat = 1; rd_data = 32'(100 + 8*b + i); @(negedge clk); end
      rd_beat = 0;
    end
    `CHECK(!rd_req && rb_count == 16, "no request past the length, 16 beats held")
    for (int i = 0; i < 16; i++) begin
      rb_pop = 1; @(negedge clk); rb_pop = 0; #1;
      `CHECK(rb_data == 32'(100 + i), $sformatf("readback beat %0d", i))
    end
    `CHECK(rb_empty && !rd_busy, "readback finished")
    // flow control: a 16-deep readback FIFO with 9 beats in it has no room
    rd_len = 32; rd_load = 1; @(negedge clk); rd_load = 0;
    rd_grant = 1; @(negedge clk); rd_grant = 0;
    for (int i = 0; i < 9; i++) begin rd_beat = 1; rd_data = 32'(i); @(negedge clk); end
    rd_beat = 0; #1;
    `CHECK(!rd_req, "no request without room for 8")
    rb_pop = 1; @(negedge clk); rb_pop = 0; #1;
    `CHECK(rd_req, "request once 8 free")
    `TB_DONE
  end
endmodule
