// tb_async_fifo: writer at 125 MHz, reader at 100 MHz with random stalls on
// both sides; checks the data order end to end, that full stops writes at the
// depth, that empty is reported, and that the counts settle to the true level.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_async_fifo;
  int checks = 0, failures = 0;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #4 wclk = ~wclk;
  always #5 rclk = ~rclk;
  logic wr_en = 0, rd_en = 0, wr_full, rd_empty;
  logic [63:0] wr_data = 0, rd_data;
  logic [4:0] wr_count, rd_count;
  async_fifo #(.W(64), .AW(4)) dut (.wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en, .wr_data, .wr_full, .wr_count,
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en, .rd_data, .rd_empty, .rd_count);
  `WATCHDOG(wclk, 20000)
  longint nw = 0, nr = 0;
  bit fill_phase = 1;
  always @(negedge wclk) if (wrst_n) begin
    if (wr_en && !wr_full) nw++;
  end
  initial begin
    repeat (3) @(negedge wclk); wrst_n = 1; rrst_n = 1;
    // fill with no reader
    repeat (30) begin
      @(negedge wclk); wr_en = 1; wr_data = 64'(nw) * 64'h0101_0101_0101_0101;
      @(posedge wclk); #1; if (!wr_full) ;
    end
    @(negedge wclk); wr_en = 0;
    `CHECK(wr_full && nw == 16, $sformatf("full at depth 16 (wrote %0d)", nw))
    repeat (6) @(negedge rclk);
    `CHECK(rd_count == 16, "read side sees 16")
    fill_phase = 0;
    // random traffic
    fork
      begin
        repeat (2000) begin
          @(negedge wclk); wr_en = ($urandom_range(0, 2) != 0); wr_data = 64'(nw) * 64'h0101_0101_0101_0101;
        end
        @(negedge wclk); wr_en = 0;
      end
      begin
        repeat (3000) begin
          @(negedge rclk);
          rd_en = ($urandom_range(0, 3) != 0);
          #0;
          if (rd_en && !rd_empty) begin
            `CHECK(rd_data == 64'(nr) * 64'h0101_0101_0101_0101, $sformatf("word %0d in order", nr))
            nr++;
          end
        end
        rd_en = 0;
      end
    join
    repeat (6) @(negedge rclk);
    `CHECK(rd_empty && nr == nw, $sformatf("all %0d words read, fifo empty", nw))
    `CHECK(wr_count == 0 && rd_count == 0, "counts back to zero")
    `TB_DONE
  end
endmodule
