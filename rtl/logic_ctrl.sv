// logic_ctrl: the card's host-visible logic controller, in the system clock
// domain. It is the register file behind BAR0 (map in daq_pkg): it holds the
// record set-up (record length, single/dual channel, channel), the front-end
// settings the host programs (attenuator relay bits per channel, offset DAC
// code per channel, trigger-level DAC code) and the SDRAM CAS latency, starts
// records (arm) and readbacks, and reports status. Writing CTRL with bit 0 set
// arms a record: the write pointer of the SDRAM restarts at 0 and a toggle
// carries the arm to the sample domain. Writing CTRL bit 3 starts a readback of
// RD_LEN beats from RD_ADDR; each read of DATA then returns the next 32-bit
// beat. A DATA read waits while a readback is still fetching and returns 0 when
// none is running. STATUS: [0] record busy, [1] record done, [2] FIFO
// overflow, [3] SDRAM initialised, [4] channel selected, [5] record stored in
// SDRAM, [6] readback busy, [9:8] CAS latency in force. Each access is acked
// with sys_ack one or more cycles after sys_req. The register map, field
// widths (12-bit DAC codes, four relays per channel) and the DATA behaviour
// are this design's choices.
`timescale 1ns/1ps
module logic_ctrl
  import daq_pkg::*;
#(
  parameter int unsigned FIFO_AW = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  // local bus from the PCI side
  input  logic                sys_req,
  input  logic                sys_we,
  input  logic [11:0]         sys_addr,
  input  logic [31:0]         sys_wdata,
  output logic                sys_ack,
  output logic [31:0]         sys_rdata,
  // record control (to the sample domain via synchronizers)
  output logic                arm_tgl,
  output logic                dual,
  output logic                ch_single,
  output logic [31:0]         rec_len,
  input  logic                acq_busy,     // synchronized
  input  logic                acq_done,     // synchronized
  input  logic                acq_ovf,      // synchronized
  input  logic                acq_ch,       // synchronized
  input  logic [FIFO_AW:0]    fifo_count,
  // front end
  output logic [7:0]          relay,
  output logic [11:0]         offset_ch1,
  output logic [11:0]         offset_ch2,
  output logic [11:0]         trig_level,
  // SDRAM controller
  output logic                mode_wr,
  output logic [1:0]          mode_wdata,
  output logic                wr_clear,
  output logic                rd_load,
  output logic [SD_LIN_W-1:0] rd_start,
  output logic [SD_LIN_W:0]   rd_len,
  output logic                rb_pop,
  input  logic [SD_DQ_W-1:0]  rb_data,
  input  logic                rb_empty,
  input  logic                rd_busy,
  input  logic                init_done,
  input  logic [SD_LIN_W:0]   wr_beats,
  input  logic [1:0]          cas_lat
);
  typedef enum logic [1:0] {L_IDLE, L_DWAIT, L_POP, L_TAKE} lstate_e;
  lstate_e    st;
  logic       arm_pend;
  logic [7:0] ra;
  logic       stored;
  logic [31:0] status;

  assign ra     = sys_addr[7:0];
  assign stored = acq_done && !arm_pend && (fifo_count == '0);
  assign status = {22'h0, cas_lat, 1'b0, rd_busy, stored, acq_ch, init_done, acq_ovf, acq_done, acq_busy};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= L_IDLE;
      sys_ack    <= 1'b0;
      sys_rdata  <= '0;
      arm_tgl    <= 1'b0;
      arm_pend   <= 1'b0;
      dual       <= 1'b0;
      ch_single  <= 1'b0;
      rec_len    <= 32'd1024;
      relay      <= '0;
      offset_ch1 <= 12'h800;
      offset_ch2 <= 12'h800;
      trig_level <= 12'h800;
      mode_wr    <= 1'b0;
      mode_wdata <= 2'd2;
      wr_clear   <= 1'b0;
      rd_load    <= 1'b0;
      rd_start   <= '0;
      rd_len     <= '0;
      rb_pop     <= 1'b0;
    end else begin
      sys_ack  <= 1'b0;
      mode_wr  <= 1'b0;
      wr_clear <= 1'b0;
      rd_load  <= 1'b0;
      rb_pop   <= 1'b0;
      if (arm_pend && !acq_done) arm_pend <= 1'b0;
      unique case (st)
        L_IDLE: if (sys_req) begin
          if (sys_we) begin
            sys_ack <= 1'b1;
            unique case (ra)
              REG_CTRL: begin
                dual      <= sys_wdata[1];
                ch_single <= sys_wdata[2];
                if (sys_wdata[0]) begin
                  arm_tgl  <= ~arm_tgl;
                  arm_pend <= 1'b1;
                  wr_clear <= 1'b1;
                end
                if (sys_wdata[3]) rd_load <= 1'b1;
              end
              REG_REC_LEN:  rec_len    <= sys_wdata;
              REG_RELAY:    relay      <= sys_wdata[7:0];
              REG_OFFSET: begin
                offset_ch1 <= sys_wdata[11:0];
                offset_ch2 <= sys_wdata[27:16];
              end
              REG_TRIG_LVL: trig_level <= sys_wdata[11:0];
              REG_SD_MODE: begin
                mode_wr    <= 1'b1;
                mode_wdata <= sys_wdata[1:0];
              end
              REG_RD_ADDR:  rd_start   <= sys_wdata[SD_LIN_W-1:0];
              REG_RD_LEN:   rd_len     <= sys_wdata[SD_LIN_W:0];
              default: ;
            endcase
          end else begin
            unique case (ra)
              REG_CTRL:     begin sys_rdata <= {28'h0, 1'b0, ch_single, dual, 1'b0}; sys_ack <= 1'b1; end
              REG_STATUS:   begin sys_rdata <= status; sys_ack <= 1'b1; end
              REG_REC_LEN:  begin sys_rdata <= rec_len; sys_ack <= 1'b1; end
              REG_RELAY:    begin sys_rdata <= {24'h0, relay}; sys_ack <= 1'b1; end
              REG_OFFSET:   begin sys_rdata <= {4'h0, offset_ch2, 4'h0, offset_ch1}; sys_ack <= 1'b1; end
              REG_TRIG_LVL: begin sys_rdata <= {20'h0, trig_level}; sys_ack <= 1'b1; end
              REG_SD_MODE:  begin sys_rdata <= {30'h0, mode_wdata}; sys_ack <= 1'b1; end
              REG_RD_ADDR:  begin sys_rdata <= 32'(rd_start); sys_ack <= 1'b1; end
              REG_RD_LEN:   begin sys_rdata <= 32'(rd_len); sys_ack <= 1'b1; end
              REG_WR_COUNT: begin sys_rdata <= 32'(wr_beats); sys_ack <= 1'b1; end
              REG_DATA:     st <= L_DWAIT;
              default:      begin sys_rdata <= '0; sys_ack <= 1'b1; end
            endcase
          end
        end
        L_DWAIT: begin
          if (!rb_empty) begin
            rb_pop <= 1'b1;
            st     <= L_POP;
          end else if (!rd_busy) begin
            sys_rdata <= '0;
            sys_ack   <= 1'b1;
            st        <= L_IDLE;
          end
        end
        L_POP: st <= L_TAKE;            // readback FIFO updates rb_data
        L_TAKE: begin
          sys_rdata <= rb_data;
          sys_ack   <= 1'b1;
          st        <= L_IDLE;
        end
        default: st <= L_IDLE;
      endcase
    end
  end
endmodule
