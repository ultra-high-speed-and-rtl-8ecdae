// sdram_block_mgr: the SDRAM controller's data-block management module. It
// moves data in blocks of one SDRAM burst (8 beats of 32 bits).
// Write side: when the sample FIFO holds at least 4 sample words (one burst)
// it requests a write burst; while the central controller takes beats
// (wr_beat) it offers the low and then the high half of the FIFO's head word
// and pops the word after its high half.
// Read side: the host loads a beat count (rd_load, rd_len rounded down to a
// multiple of 8); while beats remain and the readback FIFO has room for a
// whole burst it requests a read burst (rd_req, consumed by rd_grant). Beats
// returned by the controller (rd_beat) go into the readback FIFO, which the
// host side empties one 32-bit word at a time (rb_pop shows the next word on
// rb_data at the following edge). Burst-sized blocks and the readback FIFO
// depth are this design's choices.
`timescale 1ns/1ps
module sdram_block_mgr
  import daq_pkg::*;
#(
  parameter int unsigned FIFO_AW = 12,     // sample FIFO address bits (count width FIFO_AW+1)
  parameter int unsigned RB_AW   = 5       // readback FIFO: 2**RB_AW beats
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // sample FIFO, read side
  input  logic [WORD_W-1:0]    fifo_rdata,
  input  logic [FIFO_AW:0]     fifo_count,
  output logic                 fifo_rd_en,
  // central controller, write path
  output logic                 wr_req,
  input  logic                 wr_beat,
  output logic [SD_DQ_W-1:0]   wr_data,
  // central controller, read path
  output logic                 rd_req,
  input  logic                 rd_grant,
  input  logic                 rd_beat,
  input  logic [SD_DQ_W-1:0]   rd_data,
  // host side
  input  logic                 rd_load,
  input  logic [SD_LIN_W:0]    rd_len,
  input  logic                 rb_pop,
  output logic [SD_DQ_W-1:0]   rb_data,
  output logic                 rb_empty,
  output logic [RB_AW:0]       rb_count,
  output logic                 rd_busy       // beats still to be fetched or delivered
);
  localparam int unsigned BW = $clog2(SD_BURST);

  // ---------------- write side
  logic half;
  assign wr_req     = (fifo_count >= (FIFO_AW+1)'(SD_BURST / 2));
  assign wr_data    = half ? fifo_rdata[WORD_W-1:SD_DQ_W] : fifo_rdata[SD_DQ_W-1:0];
  assign fifo_rd_en = wr_beat && half;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       half <= 1'b0;
    else if (wr_beat) half <= ~half;
  end

  // ---------------- read side
  logic [SD_LIN_W:0]    remain;
  logic [SD_DQ_W-1:0]   rb_mem [2**RB_AW];
  logic [RB_AW:0]       rb_wp, rb_rp;

  assign rb_count = rb_wp - rb_rp;
  assign rb_empty = (rb_count == '0);
  assign rd_req   = (remain != '0) && (rb_count <= (RB_AW+1)'(2**RB_AW - SD_BURST));
  assign rd_busy  = (remain != '0) || !rb_empty;

  always_ff @(posedge clk) begin
    if (rd_beat) rb_mem[rb_wp[RB_AW-1:0]] <= rd_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remain  <= '0;
      rb_wp   <= '0;
      rb_rp   <= '0;
      rb_data <= '0;
    end else begin
      if (rd_load) begin
        remain <= {rd_len[SD_LIN_W:BW], BW'(0)};
        rb_wp  <= '0;
        rb_rp  <= '0;
      end else begin
        if (rd_grant) remain <= remain - (SD_LIN_W+1)'(SD_BURST);
        if (rd_beat)  rb_wp  <= rb_wp + 1'b1;
        if (rb_pop && !rb_empty) begin
          rb_data <= rb_mem[rb_rp[RB_AW-1:0]];
          rb_rp   <= rb_rp + 1'b1;
        end
      end
    end
  end
endmodule
