// tb_record_capacity: how long a 1 GS/s record the card can hold, run on the
// top level at its default sizes. Samples arrive at 1000 MB/s while the SDRAM
// write path sustains 32 bytes per 14 cycles of 100 MHz (about 229 MB/s), so
// a record grows the 4096-word on-chip FIFO by about 0.77 word per sample
// word and the FIFO runs full after about 4096 / 0.77 = 5300 words
// (42 us). The test takes a 4800-word record, which must be stored whole
// (no overflow, 9600 beats written across many SDRAM rows and all banks),
// reads every beat back over PCI and checks all 38,400 samples for the 1 ns
// ramp, and records the peak FIFO fill. It then takes a 5600-word record,
// which must overflow. The capacity figure is this design's arithmetic; the
// sample rate, memory width and clock follow the card it implements.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_record_capacity;
  import daq_pkg::*;
  int checks = 0, failures = 0;

  logic pll_inclk = 0, sys_clk = 0, pci_clk = 0, rst_n = 1, pci_rst_n = 1;
  initial begin #1 rst_n = 0; pci_rst_n = 0; end
  always #8  pll_inclk = ~pll_inclk;   // 62.5 MHz
  always #5  sys_clk   = ~sys_clk;     // 100 MHz
  always #15 pci_clk   = ~pci_clk;     // 33 MHz

  logic [7:0] adc_enc;
  logic [7:0][7:0] adc_d;
  logic pll_locked, trig_in = 0, ch_sel;
  logic [7:0] relay; logic [11:0] offset_ch1, offset_ch2, trig_level;
  logic [31:0] pci_ad_i, pci_ad_o; logic [3:0] pci_cbe_n;
  logic pci_ad_oe, pci_frame_n, pci_irdy_n, pci_idsel, pci_par_o, pci_par_oe;
  logic pci_trdy_n, pci_devsel_n, pci_stop_n, pci_ctl_oe;
  logic sd_clk, sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [1:0] sd_ba; logic [12:0] sd_a; logic [3:0] sd_dqm; logic [31:0] sd_dq_o, sd_dq_i;

  daq_card_top dut (.pll_inclk, .sys_clk, .rst_n, .adc_enc, .adc_d, .pll_locked, .trig_in, .ch_sel,
    .relay, .offset_ch1, .offset_ch2, .trig_level,
    .pci_clk, .pci_rst_n, .pci_ad_i, .pci_ad_o, .pci_ad_oe, .pci_cbe_n, .pci_frame_n, .pci_irdy_n,
    .pci_idsel, .pci_par_o, .pci_par_oe, .pci_trdy_n, .pci_devsel_n, .pci_stop_n, .pci_ctl_oe,
    .sd_clk, .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a, .sd_dqm,
    .sd_dq_o, .sd_dq_oe, .sd_dq_i);

  sdram_model mem (.clk(sd_clk), .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n),
    .we_n(sd_we_n), .ba(sd_ba), .a(sd_a), .dq_in(sd_dq_o), .dq_oe(sd_dq_oe), .dq_out(sd_dq_i));

  pci_master_bfm m (.clk(pci_clk), .ad_i(pci_ad_i), .ad_o(pci_ad_o), .ad_oe(pci_ad_oe), .cbe_n(pci_cbe_n),
    .frame_n(pci_frame_n), .irdy_n(pci_irdy_n), .idsel(pci_idsel), .par_o(pci_par_o), .par_oe(pci_par_oe),
    .trdy_n(pci_trdy_n), .devsel_n(pci_devsel_n), .stop_n(pci_stop_n), .ctl_oe(pci_ctl_oe));

  // converters: input = CH1 rising ramp or CH2 falling ramp, one code per ns;
  // the selected channel is what the selector passes at the sampling instant
  function automatic logic [7:0] analog(input logic ch, input realtime t);
    longint n = longint'($floor(t + 0.25));
    return ch ? 8'(255 - (n % 256)) : 8'(n % 256);
  endfunction
  initial adc_d = '0;
  for (genvar k = 0; k < 8; k++) begin : g_adc
    always @(posedge adc_enc[k]) begin
      automatic logic [7:0] v = analog(ch_sel, $realtime);
      #2 adc_d[k] = v;
    end
  end

  `WATCHDOG(pci_clk, 400000)

  localparam logic [31:0] BAR = 32'hD000_0000;
  logic [31:0] r; bit ok;
  int peak = 0;

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    logic [31:0] x; bit o;
    m.xfer(4'b0111, BAR | 32'(a), 0, d, 0, x, o);
    `CHECK(o, $sformatf("write %h accepted", a))
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    bit o;
    m.xfer(4'b0110, BAR | 32'(a), 0, 0, 0, d, o);
    `CHECK(o, $sformatf("read %h accepted", a))
  endtask
  task automatic fire_trigger();
    #($urandom_range(100, 400) * 1.0 + 0.3);
    trig_in = 1;
    #50 trig_in = 0;
  endtask
  task automatic wait_stored();
    logic [31:0] s;
    do begin rd(REG_STATUS, s); end while (!s[5]);
  endtask

  // peak FIFO fill as seen by the SDRAM side
  always @(posedge sys_clk)
    if (int'(dut.fifo_rcount) > peak) peak = int'(dut.fifo_rcount);

  initial begin
    int bad, n, peak1;
    logic [7:0] prev, cur;
    repeat (5) @(posedge pci_clk); rst_n = 1; pci_rst_n = 1;
    m.xfer(4'b1011, 32'h10, 1, BAR, 0, r, ok);
    m.xfer(4'b1011, 32'h04, 1, 32'h2, 0, r, ok);
    do begin rd(REG_STATUS, r); end while (!r[3]);
    peak = 0;

    // ---- 4800 words: must fit
    wr(REG_REC_LEN, 4800);
    wr(REG_CTRL, 32'h1);
    fire_trigger();
    wait_stored();
    rd(REG_STATUS, r);
    `CHECK(!r[2], "4800-word record stored without overflow")
    rd(REG_WR_COUNT, r);
    `CHECK(r == 9600, $sformatf("9600 beats written, got %0d", r))
    peak1 = peak;
    `CHECK(peak1 > 3000 && peak1 < 4096, $sformatf("FIFO peak fill %0d of 4096 words", peak1))
    wr(REG_RD_ADDR, 0); wr(REG_RD_LEN, 9600); wr(REG_CTRL, 32'h8);
    bad = 0; n = 0; prev = '0;
    for (int i = 0; i < 9600; i++) begin
      rd(REG_DATA, r);
      for (int b = 0; b < 4; b++) begin
        cur = r[8*b +: 8];
        if (n > 0 && cur != 8'(prev + 1)) bad++;
        prev = cur; n++;
      end
    end
    `CHECK(n == 38400 && bad == 0, $sformatf("%0d of %0d samples off the 1 ns ramp", bad, n))

    // ---- 5600 words: must overflow
    wr(REG_REC_LEN, 5600);
    wr(REG_CTRL, 32'h1);
    fire_trigger();
    wait_stored();
    rd(REG_STATUS, r);
    `CHECK(r[2], "5600-word record overflows the FIFO")
    `CHECK(mem.errors == 0, $sformatf("SDRAM rule breaks %0d", mem.errors))
    `CHECK(m.par_errors == 0 && m.aborts == 0, "PCI clean")
    $display("record capacity: peak FIFO fill %0d of 4096 words for a 4800-word record", peak1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
