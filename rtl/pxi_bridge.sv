// pxi_bridge: carries single local-bus accesses from the PCI clock domain
// (33 MHz) to the card's system clock domain (100 MHz) and the answer back.
// A request latches address, direction and write data and flips a toggle;
// the other side sees the flip through a two-flop synchronizer, issues a
// one-cycle sys_req with the (by then stable) fields, and flips an answer
// toggle when sys_ack comes back with read data, which the PCI side in turn
// turns into lb_ack. One access may be outstanding at a time; a round trip
// takes about 2 PCI clocks plus 3 system clocks plus the register file's own
// time. The handshake is this design's choice.
`timescale 1ns/1ps
module pxi_bridge (
  input  logic        pci_clk,
  input  logic        pci_rst_n,
  input  logic        lb_req,
  input  logic        lb_we,
  input  logic [11:0] lb_addr,
  input  logic [31:0] lb_wdata,
  output logic        lb_ack,
  output logic [31:0] lb_rdata,

  input  logic        sys_clk,
  input  logic        sys_rst_n,
  output logic        sys_req,
  output logic        sys_we,
  output logic [11:0] sys_addr,
  output logic [31:0] sys_wdata,
  input  logic        sys_ack,
  input  logic [31:0] sys_rdata
);
  logic req_t, ack_t, req_t_s, ack_t_s, req_seen, ack_seen;
  logic [31:0] rdata_q;

  // PCI side
  always_ff @(posedge pci_clk or negedge pci_rst_n) begin
    if (!pci_rst_n) begin
      req_t     <= 1'b0;
      ack_seen  <= 1'b0;
      lb_ack    <= 1'b0;
      sys_we    <= 1'b0;
      sys_addr  <= '0;
      sys_wdata <= '0;
    end else begin
      lb_ack   <= 1'b0;
      ack_seen <= ack_t_s;
      if (ack_t_s != ack_seen) lb_ack <= 1'b1;
      if (lb_req) begin
        sys_we    <= lb_we;
        sys_addr  <= lb_addr;
        sys_wdata <= lb_wdata;
        req_t     <= ~req_t;
      end
    end
  end
  assign lb_rdata = rdata_q;

  cdc_sync #(.W(1)) u_req_sync (.clk(sys_clk), .rst_n(sys_rst_n), .d(req_t), .q(req_t_s));
  cdc_sync #(.W(1)) u_ack_sync (.clk(pci_clk), .rst_n(pci_rst_n), .d(ack_t), .q(ack_t_s));

  // system side
  always_ff @(posedge sys_clk or negedge sys_rst_n) begin
    if (!sys_rst_n) begin
      req_seen <= 1'b0;
      ack_t    <= 1'b0;
      rdata_q  <= '0;
    end else begin
      req_seen <= req_t_s;
      if (sys_ack) begin
        rdata_q <= sys_rdata;
        ack_t   <= ~ack_t;
      end
    end
  end
  assign sys_req = (req_t_s != req_seen);
endmodule
