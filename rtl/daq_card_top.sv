// daq_card_top: FPGA logic of a two-channel 1 GS/s acquisition card on the PXI
// bus. Eight 8-bit 125 MS/s converters sample one input in turn on eight
// encode clocks 45 degrees apart (sample_pll); adc_capture packs their bytes
// into one 64-bit word per 8 ns; acq_ctrl, started by the host and released by
// the trigger comparator (trigger_detect), writes a record of words into the
// dual-clock sample FIFO; sdram_ctrl drains the FIFO into 128 MB of SDRAM in
// 8-beat bursts and reads it back for the host, which reaches everything
// through the PXI target (pxi_target), the clock-crossing bridge (pxi_bridge)
// and the register file (logic_ctrl). The two analog inputs share the
// converters through a selector switched by ch_sel.
// Clock domains: the 125 MHz sample-word clock (PLL phase 0), the 100 MHz
// system/SDRAM clock sys_clk (also forwarded to the SDRAM as sd_clk) and the
// 33 MHz PCI clock. Crossings: the sample FIFO, the bridge, and two-flop
// synchronizers for the arm toggle, the record settings (quasi-static while a
// record runs) and the record status. The FIFO admits record words in
// groups of four (one SDRAM burst): fifo_afull, from the write-side count,
// tells acq_ctrl at each group start whether four more words fit, and an
// assertion checks that no word is ever pushed into a full FIFO.
// Analog parts (front end, selector, converters, trigger comparator, DACs,
// relays) and the SDRAM devices are outside; their signals are ports. Bus pins
// come as _i/_o/_oe triples for the pads.
`timescale 1ns/1ps
module daq_card_top
  import daq_pkg::*;
#(
  parameter int unsigned PWRUP   = 20000,   // SDRAM power-up wait, sys_clk cycles
  parameter int unsigned T_REFI  = 780,     // refresh interval, sys_clk cycles
  parameter int unsigned FIFO_AW = 12,      // sample FIFO: 2**FIFO_AW words of 64 bits
  parameter int unsigned SETTLE  = 16       // selector settle time, sample-word cycles
) (
  input  logic                          pll_inclk,   // 62.5 MHz board clock
  input  logic                          sys_clk,     // 100 MHz
  input  logic                          rst_n,
  // converters
  output logic [N_ADC-1:0]              adc_enc,     // encode clocks, 45 degrees apart
  input  logic [N_ADC-1:0][SAMPLE_W-1:0] adc_d,
  output logic                          pll_locked,
  // trigger comparator (after level conversion) and front end
  input  logic                          trig_in,
  output logic                          ch_sel,      // 0 = CH1, 1 = CH2
  output logic [7:0]                    relay,
  output logic [11:0]                   offset_ch1,
  output logic [11:0]                   offset_ch2,
  output logic [11:0]                   trig_level,
  // PXI / PCI
  input  logic                          pci_clk,
  input  logic                          pci_rst_n,
  input  logic [31:0]                   pci_ad_i,
  output logic [31:0]                   pci_ad_o,
  output logic                          pci_ad_oe,
  input  logic [3:0]                    pci_cbe_n,
  input  logic                          pci_frame_n,
  input  logic                          pci_irdy_n,
  input  logic                          pci_idsel,
  output logic                          pci_par_o,
  output logic                          pci_par_oe,
  output logic                          pci_trdy_n,
  output logic                          pci_devsel_n,
  output logic                          pci_stop_n,
  output logic                          pci_ctl_oe,
  // SDRAM
  output logic                          sd_clk,
  output logic                          sd_cke,
  output logic                          sd_cs_n,
  output logic                          sd_ras_n,
  output logic                          sd_cas_n,
  output logic                          sd_we_n,
  output logic [SD_BA_W-1:0]            sd_ba,
  output logic [SD_ADDR_W-1:0]          sd_a,
  output logic [SD_DQ_W/8-1:0]          sd_dqm,
  output logic [SD_DQ_W-1:0]            sd_dq_o,
  output logic                          sd_dq_oe,
  input  logic [SD_DQ_W-1:0]            sd_dq_i
);
  // ---------------- clocks and resets
  logic [N_ADC-1:0] ph;
  logic             sclk;              // sample-word clock
  logic             s_rst_n, s_rst_m;
  logic             y_rst_n, y_rst_m;  // sys_clk domain

  sample_pll u_pll (.inclk0(pll_inclk), .areset(!rst_n), .c(ph), .locked(pll_locked));
  assign sclk    = ph[0];
  assign adc_enc = ph;
  assign sd_clk  = sys_clk;

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) {s_rst_n, s_rst_m} <= '0;
    else        {s_rst_n, s_rst_m} <= {s_rst_m, pll_locked};
  end
  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) {y_rst_n, y_rst_m} <= '0;
    else        {y_rst_n, y_rst_m} <= {y_rst_m, 1'b1};
  end

  // ---------------- sample domain
  logic [WORD_W-1:0] word, fifo_wdata;
  logic              word_valid, trig_evt, fifo_wr, fifo_full, fifo_afull;
  logic              arm_tgl, arm_tgl_s, arm_tgl_q, arm_s;
  logic              dual, ch_single, dual_s, ch_single_s;
  logic [31:0]       rec_len, rec_len_s;
  logic              acq_busy, acq_done, acq_ovf;
  logic [FIFO_AW:0]  fifo_wcount;

  adc_capture u_cap (.clk_ph(ph), .rst_n(s_rst_n), .adc_d, .word, .word_valid);

  trigger_detect u_trig (.clk(sclk), .rst_n(s_rst_n), .trig_in, .trig_evt);

  cdc_sync #(.W(35)) u_cfg_sync (.clk(sclk), .rst_n(s_rst_n),
    .d({arm_tgl, dual, ch_single, rec_len}), .q({arm_tgl_s, dual_s, ch_single_s, rec_len_s}));

  always_ff @(posedge sclk or negedge s_rst_n) begin
    if (!s_rst_n) arm_tgl_q <= 1'b0;
    else          arm_tgl_q <= arm_tgl_s;
  end
  assign arm_s = arm_tgl_s ^ arm_tgl_q;

  acq_ctrl #(.SETTLE(SETTLE)) u_acq (
    .clk(sclk), .rst_n(s_rst_n), .arm(arm_s), .dual(dual_s), .ch_single(ch_single_s),
    .rec_len(rec_len_s), .trig_evt, .word, .word_valid, .fifo_afull,
    .fifo_wr, .fifo_wdata, .ch_sel, .busy(acq_busy), .done(acq_done), .overflow(acq_ovf));

  // ---------------- sample FIFO (sample domain -> sys_clk domain)
  logic [WORD_W-1:0] fifo_rdata;
  logic              fifo_rd_en, fifo_empty;
  logic [FIFO_AW:0]  fifo_rcount;

  async_fifo #(.W(WORD_W), .AW(FIFO_AW)) u_fifo (
    .wr_clk(sclk), .wr_rst_n(s_rst_n), .wr_en(fifo_wr), .wr_data(fifo_wdata),
    .wr_full(fifo_full), .wr_count(fifo_wcount),
    .rd_clk(sys_clk), .rd_rst_n(y_rst_n), .rd_en(fifo_rd_en), .rd_data(fifo_rdata),
    .rd_empty(fifo_empty), .rd_count(fifo_rcount));
  // room for a whole 4-word group (one SDRAM burst); the write-side count
  // never under-states the fill, so a group admitted here cannot meet a full FIFO
  assign fifo_afull = (fifo_wcount > (FIFO_AW+1)'((1 << FIFO_AW) - 4));
  a_no_push_when_full: assert property (@(posedge sclk) disable iff (!s_rst_n) fifo_wr |-> !fifo_full);

  // ---------------- sys_clk domain
  localparam int unsigned RB_AW_C = 5;     // readback FIFO: 32 beats
  logic                acq_busy_y, acq_done_y, acq_ovf_y, ch_sel_y;
  logic                mode_wr, wr_clear, rd_load, rb_pop, rb_empty, rd_busy, init_done;
  logic [1:0]          mode_wdata, cas_lat;
  logic [SD_LIN_W-1:0] rd_start;
  logic [SD_LIN_W:0]   rd_len, wr_beats;
  logic [SD_DQ_W-1:0]  rb_data;
  logic [RB_AW_C:0]    rb_count;

  cdc_sync #(.W(4)) u_stat_sync (.clk(sys_clk), .rst_n(y_rst_n),
    .d({acq_busy, acq_done, acq_ovf, ch_sel}), .q({acq_busy_y, acq_done_y, acq_ovf_y, ch_sel_y}));

  sdram_ctrl #(.PWRUP(PWRUP), .T_REFI(T_REFI), .FIFO_AW(FIFO_AW), .RB_AW(RB_AW_C)) u_sdc (
    .clk(sys_clk), .rst_n(y_rst_n),
    .fifo_rdata, .fifo_count(fifo_rcount), .fifo_rd_en,
    .mode_wr, .mode_wdata, .wr_clear, .rd_load, .rd_start, .rd_len,
    .rb_pop, .rb_data, .rb_empty, .rb_count, .rd_busy, .init_done, .wr_beats, .cas_lat,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a, .sd_dqm,
    .sd_dq_o, .sd_dq_oe, .sd_dq_i);

  logic        sys_req, sys_we, sys_ack;
  logic [11:0] sys_addr;
  logic [31:0] sys_wdata, sys_rdata;

  logic_ctrl #(.FIFO_AW(FIFO_AW)) u_regs (
    .clk(sys_clk), .rst_n(y_rst_n),
    .sys_req, .sys_we, .sys_addr, .sys_wdata, .sys_ack, .sys_rdata,
    .arm_tgl, .dual, .ch_single, .rec_len,
    .acq_busy(acq_busy_y), .acq_done(acq_done_y), .acq_ovf(acq_ovf_y), .acq_ch(ch_sel_y),
    .fifo_count(fifo_rcount),
    .relay, .offset_ch1, .offset_ch2, .trig_level,
    .mode_wr, .mode_wdata, .wr_clear, .rd_load, .rd_start, .rd_len,
    .rb_pop, .rb_data, .rb_empty, .rd_busy, .init_done, .wr_beats, .cas_lat);

  // ---------------- PXI interface
  logic        lb_req, lb_we, lb_ack;
  logic [11:0] lb_addr;
  logic [31:0] lb_wdata, lb_rdata;

  pxi_target u_pxi (
    .clk(pci_clk), .rst_n(pci_rst_n),
    .ad_i(pci_ad_i), .cbe_n_i(pci_cbe_n), .frame_n(pci_frame_n), .irdy_n(pci_irdy_n),
    .idsel(pci_idsel), .ad_o(pci_ad_o), .ad_oe(pci_ad_oe), .par_o(pci_par_o),
    .par_oe(pci_par_oe), .trdy_n(pci_trdy_n), .devsel_n(pci_devsel_n), .stop_n(pci_stop_n),
    .ctl_oe(pci_ctl_oe),
    .lb_req, .lb_we, .lb_addr, .lb_wdata, .lb_ack, .lb_rdata);

  pxi_bridge u_bridge (
    .pci_clk, .pci_rst_n, .lb_req, .lb_we, .lb_addr, .lb_wdata, .lb_ack, .lb_rdata,
    .sys_clk, .sys_rst_n(y_rst_n), .sys_req, .sys_we, .sys_addr, .sys_wdata,
    .sys_ack, .sys_rdata);
endmodule
