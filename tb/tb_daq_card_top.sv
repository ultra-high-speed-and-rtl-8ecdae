// tb_daq_card_top: end-to-end test of the card logic at its default sizes,
// driven the way a host driver would drive it, through PCI cycles only.
// Around the design: eight converter models that sample a synthetic input on
// their own encode clocks (CH1 is a ramp rising one code per nanosecond, CH2
// a ramp falling one code per nanosecond, so every stored byte tells the time
// it was taken), a trigger source, the SDRAM model and a PCI master model.
// Sequence: configure the PCI header; wait for SDRAM initialisation; take a
// single CH1 record, read it back over PCI and check that every sample is
// exactly 1 ns after the one before (1 GS/s, in order) and that the first is
// just after the trigger; take a dual record (CH1 then CH2) and check both;
// change the CAS latency at run time and read again; take a record too long
// for the on-chip FIFO and check the overflow flag. Each mechanism is counted
// and one that never happened is a failure.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_daq_card_top;
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

  `WATCHDOG(pci_clk, 200000)

  localparam logic [31:0] BAR = 32'hD000_0000;
  logic [31:0] r; bit ok;
  int n_trig = 0, n_dual_switch = 0, n_overflow = 0, n_lmr_runtime = 0, n_data_wait = 0, n_enc_ok = 0;

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
  task automatic fire_trigger(output realtime t);
    #($urandom_range(100, 400) * 1.0 + 0.3);
    trig_in = 1; t = $realtime; n_trig++;
    #50 trig_in = 0;
  endtask
  task automatic wait_stored();
    logic [31:0] s;
    do begin rd(REG_STATUS, s); end while (!s[5]);
  endtask
  // read n beats from beat address a0 into q
  task automatic readback(input int a0, input int n, ref logic [7:0] q [$]);
    logic [31:0] d;
    q.delete();
    wr(REG_RD_ADDR, 32'(a0)); wr(REG_RD_LEN, 32'(n)); wr(REG_CTRL, 32'h8);
    for (int i = 0; i < n; i++) begin
      rd(REG_DATA, d);
      for (int b = 0; b < 4; b++) q.push_back(d[8*b +: 8]);
    end
  endtask
  // check a run of samples is a ramp with one code per ns (rising for CH1)
  task automatic check_ramp(ref logic [7:0] q [$], input int from, input int n, input logic ch, input string what);
    int bad = 0;
    for (int i = from + 1; i < from + n; i++) begin
      logic [7:0] exp = ch ? 8'(q[i-1] - 1) : 8'(q[i-1] + 1);
      if (q[i] != exp) bad++;
    end
    `CHECK(bad == 0, $sformatf("%s: %0d of %0d samples off the 1 ns ramp", what, bad, n))
  endtask

  // encode clocks: 125 MHz, 1 ns apart
  initial begin
    realtime t0, tk;
    wait (pll_locked); #100;
    for (int k = 1; k < 8; k++) begin
      @(posedge adc_enc[0]); t0 = $realtime; @(posedge adc_enc[k]); tk = $realtime;
      if (tk - t0 == real'(k)) n_enc_ok++;
    end
  end

  // a DATA read that found the readback FIFO empty while SDRAM reads were pending
  always @(posedge sys_clk)
    if (dut.u_regs.st == dut.u_regs.L_DWAIT && dut.u_regs.rb_empty && dut.u_regs.rd_busy) n_data_wait++;

  logic prev_ch = 0;
  always @(posedge sys_clk) begin
    if (ch_sel && !prev_ch) n_dual_switch++;
    prev_ch <= ch_sel;
  end

  logic [7:0] q [$];
  initial begin
    realtime tt; int lag; int lmr0;
    repeat (5) @(posedge pci_clk); rst_n = 1; pci_rst_n = 1;
    // PCI configuration
    m.xfer(4'b1010, 32'h0, 1, 0, 0, r, ok);
    `CHECK(ok && r[15:0] == 16'h1172, "device found")
    m.xfer(4'b1011, 32'h10, 1, BAR, 0, r, ok);
    m.xfer(4'b1011, 32'h04, 1, 32'h2, 0, r, ok);
    // SDRAM initialisation (200 us)
    do begin rd(REG_STATUS, r); end while (!r[3]);
    `CHECK(mem.n_lmr == 1 && mem.n_ref >= 8, "SDRAM initialised")
    // front-end settings reach the pins
    wr(REG_RELAY, 32'h3C); wr(REG_OFFSET, 32'h0700_0900); wr(REG_TRIG_LVL, 32'h345);
    `CHECK(relay == 8'h3C && offset_ch1 == 12'h900 && offset_ch2 == 12'h700 && trig_level == 12'h345, "front-end settings")

    // ---- single record on CH1: 64 words = 512 samples
    wr(REG_REC_LEN, 64);
    wr(REG_CTRL, 32'h1);
    fire_trigger(tt);
    wait_stored();
    rd(REG_WR_COUNT, r);
    `CHECK(r == 128, $sformatf("128 beats stored, got %0d", r))
    readback(0, 128, q);
    `CHECK(q.size() == 512, "512 samples read back")
    check_ramp(q, 0, 512, 0, "CH1 record");
    lag = int'(q[0]) - int'(longint'(tt) % 256);
    if (lag < 0) lag += 256;
    `CHECK(lag >= 0 && lag <= 16, $sformatf("first sample %0d ns after the trigger", lag))

    // ---- dual record: CH1 then CH2, 32 words each
    wr(REG_REC_LEN, 32);
    wr(REG_CTRL, 32'h3);
    fire_trigger(tt);
    #2000 fire_trigger(tt);
    wait_stored();
    readback(0, 128, q);
    check_ramp(q, 0, 256, 0, "dual CH1 record");
    check_ramp(q, 256, 256, 1, "dual CH2 record");

    // ---- CAS latency 3 at run time, same data must read back
    lmr0 = mem.n_lmr;
    wr(REG_SD_MODE, 3);
    rd(REG_STATUS, r);
    if (mem.n_lmr == lmr0 + 1 && r[9:8] == 3) n_lmr_runtime++;
    readback(64, 64, q);
    check_ramp(q, 0, 256, 1, "CH2 record at CAS latency 3");

    // ---- overflow: 8192 words cannot fit the 4096-word FIFO at SDRAM speed
    wr(REG_REC_LEN, 8192);
    wr(REG_CTRL, 32'h1);
    fire_trigger(tt);
    // a readback started now waits: write bursts keep the SDRAM busy
    wr(REG_RD_ADDR, 32'd1000000); wr(REG_RD_LEN, 32'd8); wr(REG_CTRL, 32'h8);
    rd(REG_DATA, r);
    `CHECK(r == 0, "unwritten SDRAM reads 0")
    wait_stored();
    rd(REG_STATUS, r);
    if (r[2]) n_overflow++;
    // a two-phase burst is disconnected after one data phase
    m.xfer(4'b0110, BAR | 32'(REG_STATUS), 0, 0, 1, r, ok);
    `CHECK(ok && m.disconnects == 1, "burst disconnected with data")
    rd(REG_WR_COUNT, r);
    `CHECK(r > 8000 && r < 16384, $sformatf("part of the long record stored: %0d beats", r))

    `CHECK(n_trig > 0, "trigger used")
    `CHECK(n_dual_switch > 0, "dual-channel switch happened")
    `CHECK(n_overflow > 0, "FIFO overflow flagged")
    `CHECK(n_lmr_runtime > 0, "run-time mode register load")
    `CHECK(n_data_wait > 0, "DATA read waited for SDRAM")
    `CHECK(mem.n_ref > 50, $sformatf("periodic refresh (%0d)", mem.n_ref))
    `CHECK(mem.errors == 0, $sformatf("SDRAM rule breaks %0d", mem.errors))
    `CHECK(m.par_errors == 0 && m.aborts == 0, $sformatf("PCI parity errors %0d of %0d, aborts %0d", m.par_errors, m.par_checks, m.aborts))
    `CHECK(n_enc_ok == 7, "encode clocks 1 ns apart")
    $display("mechanisms: trigger=%0d dual_switch=%0d overflow=%0d lmr=%0d data_wait=%0d refresh=%0d",
             n_trig, n_dual_switch, n_overflow, n_lmr_runtime, n_data_wait, mem.n_ref);
    `TB_DONE
  end
endmodule
