// sdram_addr_gen: the SDRAM controller's address generation module. The
// 128 MB of SDRAM is seen as 2**25 32-bit beats with a linear beat address
// {row, bank, column}; the column is the low part, so a burst of 8 beats never
// crosses a row. The write pointer starts at 0 when a record is armed
// (wr_clear) and advances by one burst each time a write burst completes; it
// doubles as the count of beats stored. The read pointer is loaded by the host
// (rd_load, rd_start, aligned down to a burst) and advances one burst per read
// burst. Both wrap at the end of the memory. The mapping is this design's own.
`timescale 1ns/1ps
module sdram_addr_gen
  import daq_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_clear,
  input  logic                wr_adv,
  input  logic                rd_load,
  input  logic [SD_LIN_W-1:0] rd_start,
  input  logic                rd_adv,
  output sd_addr_t            wr_addr,
  output sd_addr_t            rd_addr,
  output logic [SD_LIN_W:0]   wr_beats     // beats written since wr_clear
);
  logic [SD_LIN_W-1:0] wptr, rptr;
  localparam int unsigned BW = $clog2(SD_BURST);

  assign wr_addr = sd_addr_t'(wptr);
  assign rd_addr = sd_addr_t'(rptr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      wr_beats <= '0;
    end else begin
      if (wr_clear) begin
        wptr     <= '0;
        wr_beats <= '0;
      end else if (wr_adv) begin
        wptr     <= wptr + SD_LIN_W'(SD_BURST);
        wr_beats <= wr_beats + (SD_LIN_W+1)'(SD_BURST);
      end
      if (rd_load)     rptr <= {rd_start[SD_LIN_W-1:BW], BW'(0)};
      else if (rd_adv) rptr <= rptr + SD_LIN_W'(SD_BURST);
    end
  end
endmodule
