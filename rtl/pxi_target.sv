// pxi_target: PCI target interface of the card on the PXI backplane (32-bit,
// 33 MHz, PCI local-bus signalling), as the card implements it in FPGA logic.
// It answers type-0 configuration cycles (IDSEL) from a small configuration
// header: vendor/device ID, command register (memory-space enable, parity and
// SERR response bits writable), class code 11h/80h (data acquisition
// controller, other), one 4 KB non-prefetchable memory BAR, subsystem IDs and
// the interrupt-line byte. Memory reads and writes that hit BAR0 are passed to
// the local bus (lb_*) one double word at a time: lb_req is a one-cycle
// strobe with lb_we/lb_addr/lb_wdata, and the target holds TRDY# off until
// lb_ack returns (lb_rdata valid with it). Each transaction moves one data
// phase; if the master keeps FRAME# asserted the target disconnects with data
// (STOP# with TRDY#). DEVSEL# is asserted in the clock after the address
// phase (fast decode). PAR is driven one clock after every data phase the
// target drives AD in. Parity errors are not checked, byte enables of writes
// are ignored (whole double words are written) and no interrupt is used.
// Bus pins are split into _i inputs, _o outputs and _oe enables; the pads
// that combine them are outside this module.
`timescale 1ns/1ps
module pxi_target #(
  parameter logic [15:0] VENDOR_ID = 16'h1172,
  parameter logic [15:0] DEVICE_ID = 16'h0001,
  parameter logic [7:0]  REVISION  = 8'h01
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] ad_i,
  input  logic [3:0]  cbe_n_i,
  input  logic        frame_n,
  input  logic        irdy_n,
  input  logic        idsel,
  output logic [31:0] ad_o,
  output logic        ad_oe,
  output logic        par_o,
  output logic        par_oe,
  output logic        trdy_n,
  output logic        devsel_n,
  output logic        stop_n,
  output logic        ctl_oe,          // enable for TRDY#, DEVSEL#, STOP#
  // local bus
  output logic        lb_req,
  output logic        lb_we,
  output logic [11:0] lb_addr,
  output logic [31:0] lb_wdata,
  input  logic        lb_ack,
  input  logic [31:0] lb_rdata
);
  typedef enum logic [2:0] {T_IDLE, T_ACCESS, T_LWAIT, T_XFER, T_STOP, T_TURN} tstate_e;
  tstate_e     st;
  logic        bus_idle_q;
  logic        is_cfg, is_wr;
  logic [11:0] addr_q;
  logic [15:0] cmd_reg;
  logic [19:0] bar0;
  logic [7:0]  int_line;
  logic [31:0] cfg_rdata;
  logic        mem_hit, cfg_hit, cmd_rd, cmd_wr;

  // address-phase decode
  always_comb begin
    cmd_rd  = (cbe_n_i == 4'b0110) || (cbe_n_i == 4'b1100) || (cbe_n_i == 4'b1110);
    cmd_wr  = (cbe_n_i == 4'b0111) || (cbe_n_i == 4'b1111);
    mem_hit = cmd_reg[1] && (cmd_rd || cmd_wr) && (ad_i[31:12] == bar0);
    cfg_hit = idsel && (cbe_n_i[3:1] == 3'b101) && (ad_i[1:0] == 2'b00);
  end

  // configuration header
  always_comb begin
    unique case (addr_q[7:2])
      6'h00:   cfg_rdata = {DEVICE_ID, VENDOR_ID};
      6'h01:   cfg_rdata = {16'h0000, cmd_reg};
      6'h02:   cfg_rdata = {24'h118000, REVISION};
      6'h04:   cfg_rdata = {bar0, 12'h000};
      6'h0B:   cfg_rdata = {DEVICE_ID, VENDOR_ID};
      6'h0F:   cfg_rdata = {24'h000000, int_line};
      default: cfg_rdata = 32'h0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= T_IDLE;
      bus_idle_q <= 1'b1;
      is_cfg     <= 1'b0;
      is_wr      <= 1'b0;
      addr_q     <= '0;
      cmd_reg    <= '0;
      bar0       <= '0;
      int_line   <= '0;
      ad_o       <= '0;
      ad_oe      <= 1'b0;
      par_o      <= 1'b0;
      par_oe     <= 1'b0;
      trdy_n     <= 1'b1;
      devsel_n   <= 1'b1;
      stop_n     <= 1'b1;
      ctl_oe     <= 1'b0;
      lb_req     <= 1'b0;
      lb_we      <= 1'b0;
      lb_addr    <= '0;
      lb_wdata   <= '0;
    end else begin
      bus_idle_q <= frame_n && irdy_n;
      lb_req     <= 1'b0;
      par_o      <= (^ad_o) ^ (^cbe_n_i);
      par_oe     <= ad_oe;
      unique case (st)
        T_IDLE: begin
          if (!frame_n && bus_idle_q && (mem_hit || cfg_hit)) begin
            st       <= T_ACCESS;
            is_cfg   <= cfg_hit;
            is_wr    <= cfg_hit ? cbe_n_i[0] : cmd_wr;
            addr_q   <= ad_i[11:0];
            devsel_n <= 1'b0;
            ctl_oe   <= 1'b1;
          end
        end
        T_ACCESS: begin
          if (!is_wr) begin
            ad_oe <= 1'b1;
            if (is_cfg) begin
              ad_o   <= cfg_rdata;
              trdy_n <= 1'b0;
              stop_n <= frame_n;
              st     <= T_XFER;
            end else begin
              lb_req  <= 1'b1;
              lb_we   <= 1'b0;
              lb_addr <= addr_q;
              st      <= T_LWAIT;
            end
          end else if (!irdy_n) begin
            if (is_cfg) begin
              unique case (addr_q[7:2])
                6'h01: cmd_reg  <= ad_i[15:0] & 16'h0142;
                6'h04: bar0     <= ad_i[31:12];
                6'h0F: int_line <= ad_i[7:0];
                default: ;
              endcase
              trdy_n <= 1'b0;
              stop_n <= frame_n;
              st     <= T_XFER;
            end else begin
              lb_req   <= 1'b1;
              lb_we    <= 1'b1;
              lb_addr  <= addr_q;
              lb_wdata <= ad_i;
              st       <= T_LWAIT;
            end
          end
        end
        T_LWAIT: begin
          if (lb_ack) begin
            if (!is_wr) ad_o <= lb_rdata;
            trdy_n <= 1'b0;
            stop_n <= frame_n;
            st     <= T_XFER;
          end
        end
        T_XFER: begin
          if (!irdy_n) begin
            trdy_n <= 1'b1;
            ad_oe  <= 1'b0;
            if (frame_n) begin
              devsel_n <= 1'b1;
              stop_n   <= 1'b1;
              st       <= T_TURN;
            end else begin
              stop_n <= 1'b0;
              st     <= T_STOP;
            end
          end
        end
        T_STOP: begin
          if (frame_n) begin
            devsel_n <= 1'b1;
            stop_n   <= 1'b1;
            st       <= T_TURN;
          end
        end
        T_TURN: begin
          ctl_oe <= 1'b0;
          st     <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  // a data phase completes only while DEVSEL# is asserted
  assert property (@(posedge clk) disable iff (!rst_n) (!trdy_n |-> !devsel_n));
endmodule
