// async_fifo: dual-clock first-word-fall-through FIFO. It is the on-chip
// buffer ("memorizer") between the 125 MHz sample-word domain, which fills it
// at up to 1 GB/s during a record, and the 100 MHz SDRAM domain, which empties
// it in bursts. Pointers are one bit wider than the address and cross the
// clock boundary in Gray code through two-flop synchronizers, the usual
// construction; the depth is this design's choice (4096 x 64 bits = 256 Kbit,
// half the FPGA's 504 Kbit of embedded RAM).
// Write side: wr_en with wr_full low stores wr_data at that edge.
// Read side: rd_data shows the oldest word whenever rd_empty is low; rd_en
// removes it at the edge. wr_count/rd_count are the fill level as seen by each
// side (they lag the other side by the two synchronizer cycles).
`timescale 1ns/1ps
module async_fifo #(
  parameter int unsigned W  = 64,
  parameter int unsigned AW = 12          // 2**AW words
) (
  input  logic          wr_clk,
  input  logic          wr_rst_n,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  output logic          wr_full,
  output logic [AW:0]   wr_count,

  input  logic          rd_clk,
  input  logic          rd_rst_n,
  input  logic          rd_en,
  output logic [W-1:0]  rd_data,
  output logic          rd_empty,
  output logic [AW:0]   rd_count
);
  logic [W-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w, wgray_r;      // synchronized copies

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side
  logic [AW:0] rbin_w;
  assign rbin_w   = gray2bin(rgray_w);
  assign wr_count = wbin - rbin_w;
  assign wr_full  = (wr_count == (AW+1)'(2**AW));

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else if (wr_en && !wr_full) begin
      wbin  <= wbin + 1'b1;
      wgray <= bin2gray(wbin + 1'b1);
    end
  end

  cdc_sync #(.W(AW+1)) u_sync_r2w (.clk(wr_clk), .rst_n(wr_rst_n), .d(rgray), .q(rgray_w));

  // ---------------- read side
  logic [AW:0] wbin_r;
  assign wbin_r   = gray2bin(wgray_r);
  assign rd_count = wbin_r - rbin;
  assign rd_empty = (rd_count == '0);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else if (rd_en && !rd_empty) begin
      rbin  <= rbin + 1'b1;
      rgray <= bin2gray(rbin + 1'b1);
    end
  end

  cdc_sync #(.W(AW+1)) u_sync_w2r (.clk(rd_clk), .rst_n(rd_rst_n), .d(wgray), .q(wgray_r));
endmodule
