// sdram_ctrl: SDRAM controller of the card, built from the modules its
// structure names: control mode register (sdram_mode_reg), initialisation
// (sdram_init), refresh (sdram_refresh), central control (sdram_ctrl_fsm),
// address generation (sdram_addr_gen), data-block management
// (sdram_block_mgr) and the address/data selector that drives the pins
// (sdram_addr_sel). It runs at the SDRAM clock (100 MHz) on two x16 devices of
// 32M x 16 forming one 32-bit, 128 MB memory.
// Host side: mode_wr sets the CAS latency; wr_clear restarts the write pointer
// for a new record; rd_load with rd_start/rd_len starts a readback, whose beats
// are taken with rb_pop/rb_data. Sample side: the read port of the sample FIFO.
// Write bursts take priority over read bursts, so a readback started during a
// record waits until the FIFO holds less than one burst.
`timescale 1ns/1ps
module sdram_ctrl
  import daq_pkg::*;
#(
  parameter int unsigned PWRUP   = 20000,  // 200 us at 100 MHz
  parameter int unsigned T_REFI  = 780,
  parameter int unsigned FIFO_AW = 12,
  parameter int unsigned RB_AW   = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // sample FIFO read side
  input  logic [WORD_W-1:0]    fifo_rdata,
  input  logic [FIFO_AW:0]     fifo_count,
  output logic                 fifo_rd_en,
  // host side
  input  logic                 mode_wr,
  input  logic [1:0]           mode_wdata,
  input  logic                 wr_clear,
  input  logic                 rd_load,
  input  logic [SD_LIN_W-1:0]  rd_start,
  input  logic [SD_LIN_W:0]    rd_len,
  input  logic                 rb_pop,
  output logic [SD_DQ_W-1:0]   rb_data,
  output logic                 rb_empty,
  output logic [RB_AW:0]       rb_count,
  output logic                 rd_busy,
  output logic                 init_done,
  output logic [SD_LIN_W:0]    wr_beats,
  output logic [1:0]           cas_lat,
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
  sd_cmd_e              init_cmd;
  asel_e                init_asel;
  logic                 ref_req, ref_ack, lmr_req, lmr_issued;
  logic [SD_ADDR_W-1:0] mode_word;
  sd_addr_t             wr_addr, rd_addr;
  logic                 wr_req, wr_beat, wr_done, rd_req, rd_grant, rd_beat;
  logic [SD_DQ_W-1:0]   wr_data, rd_data, dq_q;
  sd_slot_t             slot;

  sdram_mode_reg u_mode (
    .clk, .rst_n, .wr(mode_wr), .wdata(mode_wdata), .init_done, .lmr_issued,
    .lmr_req, .mode_word, .cas_lat);

  sdram_init #(.PWRUP(PWRUP)) u_init (
    .clk, .rst_n, .cmd(init_cmd), .asel(init_asel), .init_done);

  sdram_refresh #(.T_REFI(T_REFI)) u_ref (
    .clk, .rst_n, .enable(init_done), .ref_ack, .ref_req);

  sdram_addr_gen u_agen (
    .clk, .rst_n, .wr_clear, .wr_adv(wr_done), .rd_load, .rd_start,
    .rd_adv(rd_grant), .wr_addr, .rd_addr, .wr_beats);

  sdram_block_mgr #(.FIFO_AW(FIFO_AW), .RB_AW(RB_AW)) u_blk (
    .clk, .rst_n, .fifo_rdata, .fifo_count, .fifo_rd_en,
    .wr_req, .wr_beat, .wr_data, .rd_req, .rd_grant, .rd_beat, .rd_data,
    .rd_load, .rd_len, .rb_pop, .rb_data, .rb_empty, .rb_count, .rd_busy);

  sdram_ctrl_fsm u_fsm (
    .clk, .rst_n, .init_cmd, .init_asel, .init_done,
    .ref_req, .ref_ack, .lmr_req, .lmr_issued, .cas_lat,
    .wr_req, .wr_addr, .wr_data, .wr_beat, .wr_done,
    .rd_req, .rd_addr, .rd_grant, .rd_beat, .rd_data, .dq_q, .slot);

  sdram_addr_sel u_sel (
    .clk, .rst_n, .slot, .mode_word, .dq_q,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a, .sd_dqm,
    .sd_dq_o, .sd_dq_oe, .sd_dq_i);
endmodule
