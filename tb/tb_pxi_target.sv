// tb_pxi_target: the PCI target against a bus-master model and a local-bus
// responder with random latency. Checks the configuration header (IDs, class
// code, BAR0 size probe, command register masking), that memory cycles are
// ignored until memory space is enabled and outside BAR0 (master abort), that
// memory writes and reads reach the local bus with the right address and data,
// that a two-phase burst is disconnected with data after its first phase, and
// PAR on every read.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_pxi_target;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #15 clk = ~clk;
  logic [31:0] ad_i, ad_o, lb_wdata, lb_rdata;
  logic [3:0] cbe_n;
  logic frame_n, irdy_n, idsel, ad_oe, par_o, par_oe, trdy_n, devsel_n, stop_n, ctl_oe;
  logic lb_req, lb_we, lb_ack = 0;
  logic [11:0] lb_addr;
  pxi_target dut (.clk, .rst_n, .ad_i, .cbe_n_i(cbe_n), .frame_n, .irdy_n, .idsel, .ad_o, .ad_oe,
    .par_o, .par_oe, .trdy_n, .devsel_n, .stop_n, .ctl_oe, .lb_req, .lb_we, .lb_addr, .lb_wdata, .lb_ack, .lb_rdata);
  pci_master_bfm m (.clk, .ad_i, .ad_o, .ad_oe, .cbe_n, .frame_n, .irdy_n, .idsel, .par_o, .par_oe,
    .trdy_n, .devsel_n, .stop_n, .ctl_oe);
  `WATCHDOG(clk, 5000)

  // local responder: 1024 words
  logic [31:0] lmem [1024];
  initial for (int i = 0; i < 1024; i++) lmem[i] = 32'hA5000000 + 32'(i);
  always @(posedge clk) if (lb_req) begin
    automatic logic [11:0] a = lb_addr;
    automatic logic we = lb_we;
    automatic logic [31:0] d = lb_wdata;
    fork begin
      repeat ($urandom_range(1, 6)) @(posedge clk);
      if (we) lmem[a[11:2]] = d;
      lb_rdata <= lmem[a[11:2]]; lb_ack <= 1;
      @(posedge clk); lb_ack <= 0;
    end join_none
  end

  logic [31:0] r; bit ok;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    m.xfer(4'b1010, 32'h0000_0000, 1, 0, 0, r, ok);
    `CHECK(ok && r == 32'h0001_1172, $sformatf("vendor/device id %h", r))
    m.xfer(4'b1010, 32'h0000_0008, 1, 0, 0, r, ok);
    `CHECK(ok && r == 32'h1180_0001, "class code and revision")
    m.xfer(4'b1011, 32'h0000_0010, 1, 32'hFFFF_FFFF, 0, r, ok);
    m.xfer(4'b1010, 32'h0000_0010, 1, 0, 0, r, ok);
    `CHECK(ok && r == 32'hFFFF_F000, "BAR0 probe: 4 KB memory")
    m.xfer(4'b1011, 32'h0000_0010, 1, 32'hD000_0000, 0, r, ok);
    m.xfer(4'b0110, 32'hD000_0010, 0, 0, 0, r, ok);
    `CHECK(!ok && m.aborts == 1, "memory disabled: master abort")
    m.xfer(4'b1011, 32'h0000_0004, 1, 32'h0000_FFFF, 0, r, ok);
    m.xfer(4'b1010, 32'h0000_0004, 1, 0, 0, r, ok);
    `CHECK(ok && r == 32'h0000_0142, "command register mask")
    m.xfer(4'b1010, 32'h0000_0004, 0, 0, 0, r, ok);
    `CHECK(!ok && m.aborts == 2, "config without IDSEL ignored")
    m.xfer(4'b0110, 32'hD000_1010, 0, 0, 0, r, ok);
    `CHECK(!ok && m.aborts == 3, "address outside BAR0 ignored")
    for (int i = 0; i < 20; i++) begin
      logic [9:0] w; logic [31:0] d;
      w = 10'($urandom); d = $urandom;
      m.xfer(4'b0111, 32'hD000_0000 | {20'h0, w, 2'b00}, 0, d, 0, r, ok);
      `CHECK(ok && lmem[w] == d, "memory write reaches the local bus")
      m.xfer(4'b0110, 32'hD000_0000 | {20'h0, w, 2'b00}, 0, 0, 0, r, ok);
      `CHECK(ok && r == d, "memory read returns local data")
    end
    m.xfer(4'b0110, 32'hD000_0040, 0, 0, 1, r, ok);
    `CHECK(ok && r == lmem[16] && m.disconnects == 1, "burst read disconnected with data")
    m.xfer(4'b0111, 32'hD000_0044, 0, 32'h1234_5678, 1, r, ok);
    `CHECK(ok && lmem[17] == 32'h1234_5678 && m.disconnects == 2, "burst write disconnected with data")
    `CHECK(m.par_checks > 20 && m.par_errors == 0, $sformatf("parity %0d checks, %0d errors", m.par_checks, m.par_errors))
    `TB_DONE
  end
endmodule
