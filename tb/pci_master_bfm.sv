// pci_master_bfm: testbench-only PCI initiator for single-data-phase
// configuration and memory cycles, with an optional second data phase to
// provoke a target disconnect. It drives FRAME#, IRDY#, C/BE# and AD one
// nanosecond after the rising clock edge, samples on the edge, resolves AD
// against the target's output enable, counts master aborts (no DEVSEL# within
// 5 clocks) and checks PAR on every read data phase.
`timescale 1ns/1ps
module pci_master_bfm (
  input  logic        clk,
  output logic [31:0] ad_i,       // AD as seen by the target
  input  logic [31:0] ad_o,
  input  logic        ad_oe,
  output logic [3:0]  cbe_n,
  output logic        frame_n,
  output logic        irdy_n,
  output logic        idsel,
  input  logic        par_o,
  input  logic        par_oe,
  input  logic        trdy_n,
  input  logic        devsel_n,
  input  logic        stop_n,
  input  logic        ctl_oe
);
  logic [31:0] m_ad;
  int aborts = 0, par_errors = 0, disconnects = 0, par_checks = 0;
  logic        last_rd_valid = 0;
  logic [31:0] last_ad;
  logic [3:0]  last_cbe;

  assign ad_i = ad_oe ? ad_o : m_ad;
  initial begin frame_n = 1; irdy_n = 1; idsel = 0; cbe_n = '1; m_ad = '0; end

  // parity: PAR of a target data phase comes one clock later
  always @(posedge clk) begin
    if (last_rd_valid) begin
      par_checks++;
      if (!par_oe || par_o != ((^last_ad) ^ (^last_cbe))) par_errors++;
    end
    last_rd_valid <= ad_oe;
    last_ad       <= ad_o;
    last_cbe      <= cbe_n;
  end

  // one transaction; burst2 keeps FRAME# low in the first data phase
  task automatic xfer(input logic [3:0] cmd, input logic [31:0] addr, input logic cfg,
                      input logic [31:0] wdata, input bit burst2, output logic [31:0] rdata, output bit ok);
    bit wr = cmd[0];
    int n;
    @(posedge clk); #1;
    frame_n = 0; m_ad = addr; cbe_n = cmd; idsel = cfg;
    @(posedge clk); #1;
    idsel = 0; frame_n = burst2 ? 1'b0 : 1'b1; irdy_n = 0; cbe_n = 4'b0000;
    m_ad = wr ? wdata : 32'h0;
    ok = 0; rdata = '0; n = 0;
    forever begin
      @(posedge clk);
      n++;
      if (devsel_n && n > 5) begin aborts++; break; end
      if (!trdy_n && !irdy_n) begin
        rdata = ad_i; ok = 1;
        if (!stop_n) disconnects++;
        break;
      end
    end
    #1;
    if (!frame_n) begin
      frame_n = 1;               // last phase after the disconnect: no data moves
      @(posedge clk); #1;
    end
    irdy_n = 1; cbe_n = '1; m_ad = '0;
    @(posedge clk); #1;
  endtask
endmodule
