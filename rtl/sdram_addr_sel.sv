// sdram_addr_sel: the SDRAM controller's address/data selector and pin
// register. Each clock it takes the command slot chosen by the central
// controller and registers it onto the SDRAM pins: the command bits, the bank
// and the address, which it selects by the slot's asel field (row for ACTIVE;
// column with A10 = 1, auto precharge, for READ/WRITE; the mode word for LOAD
// MODE REGISTER; A10 = 1 for PRECHARGE ALL), and the write data with its
// output enable. The same register stage captures the data pins (dq_q), so a
// command and its data reach the pins one cycle after their slot and read data
// reaches the controller one cycle after it is on the pins. Both chips share
// every pin except the data, which they split 16 + 16. In reset CKE is low,
// the byte masks are high and the command is NOP; afterwards CKE stays high
// and the byte masks low (every write stores all four bytes). The registered
// pins and this reset state are this design's choices; the selector itself
// is one of the controller parts of the card's SDRAM controller.
`timescale 1ns/1ps
module sdram_addr_sel
  import daq_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  sd_slot_t             slot,
  input  logic [SD_ADDR_W-1:0] mode_word,
  output logic [SD_DQ_W-1:0]   dq_q,
  // SDRAM pins
  output logic                 sd_cke,
  output logic                 sd_cs_n,
  output logic                 sd_ras_n,
  output logic                 sd_cas_n,
  output logic                 sd_we_n,
  output logic [SD_BA_W-1:0]   sd_ba,
  output logic [SD_ADDR_W-1:0] sd_a,
  output logic [SD_DQ_W/8-1:0] sd_dqm,
  output logic [SD_DQ_W-1:0]   sd_dq_o,
  output logic                 sd_dq_oe,
  input  logic [SD_DQ_W-1:0]   sd_dq_i
);
  logic [SD_ADDR_W-1:0] a_nxt;
  logic [SD_BA_W-1:0]   ba_nxt;

  always_comb begin
    a_nxt  = '0;
    ba_nxt = '0;
    unique case (slot.asel)
      ASEL_ROW:  begin a_nxt = slot.addr.row; ba_nxt = slot.addr.ba; end
      ASEL_COL:  begin
        a_nxt = SD_ADDR_W'(slot.addr.col);
        a_nxt[10] = 1'b1;
        ba_nxt = slot.addr.ba;
      end
      ASEL_MODE: a_nxt = mode_word;
      ASEL_PALL: a_nxt[10] = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= CMD_NOP;
      sd_cke   <= 1'b0;
      sd_ba    <= '0;
      sd_a     <= '0;
      sd_dqm   <= '1;
      sd_dq_o  <= '0;
      sd_dq_oe <= 1'b0;
      dq_q     <= '0;
    end else begin
      {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= slot.cmd;
      sd_cke   <= 1'b1;
      sd_ba    <= ba_nxt;
      sd_a     <= a_nxt;
      sd_dqm   <= '0;
      sd_dq_o  <= slot.wdata;
      sd_dq_oe <= slot.drive;
      dq_q     <= sd_dq_i;
    end
  end
endmodule
