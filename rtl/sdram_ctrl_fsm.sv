// sdram_ctrl_fsm: the SDRAM controller's central control module. Until the
// initialisation module reports done it passes that module's commands to the
// bus. Afterwards, whenever it is idle, it arbitrates the pending requests in
// the fixed order refresh, mode-register load, write burst, read burst
// (writes come before reads so the sample FIFO is drained first), and runs the
// chosen operation as a command sequence, one command slot per clock:
//   write: ACTIVE, T_RCD-1 NOPs, WRITE with auto precharge + 8 data beats,
//          then T_WR + T_RP NOPs;
//   read : ACTIVE, T_RCD-1 NOPs, READ with auto precharge, then it collects
//          the 8 beats, beat i arriving cas_lat + IO_LAT + i cycles after the
//          READ slot (IO_LAT = the output register of the address/data
//          selector plus its input register);
//   refresh: AUTO REFRESH, T_RFC cycles;  mode load: LOAD MODE REGISTER, T_MRD.
// Every burst closes its row (auto precharge), so all banks are idle whenever
// the controller is. The slot goes to the address/data selector, which
// registers it onto the pins. The timing counts are common data-sheet values
// for 100 MHz parts; the arbitration order is this design's choice.
`timescale 1ns/1ps
module sdram_ctrl_fsm
  import daq_pkg::*;
#(
  parameter int unsigned T_RCD  = 2,
  parameter int unsigned T_RP   = 2,
  parameter int unsigned T_WR   = 2,
  parameter int unsigned T_RFC  = 7,
  parameter int unsigned T_MRD  = 2,
  parameter int unsigned IO_LAT = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // initialisation module
  input  sd_cmd_e            init_cmd,
  input  asel_e              init_asel,
  input  logic               init_done,
  // requests
  input  logic               ref_req,
  output logic               ref_ack,
  input  logic               lmr_req,
  output logic               lmr_issued,
  input  logic [1:0]         cas_lat,
  input  logic               wr_req,
  input  sd_addr_t           wr_addr,
  input  logic [SD_DQ_W-1:0] wr_data,
  output logic               wr_beat,
  output logic               wr_done,
  input  logic               rd_req,
  input  sd_addr_t           rd_addr,
  output logic               rd_grant,
  output logic               rd_beat,
  output logic [SD_DQ_W-1:0] rd_data,
  input  logic [SD_DQ_W-1:0] dq_q,         // registered read data from the selector
  // to the address/data selector
  output sd_slot_t           slot
);
  typedef enum logic [3:0] {
    F_INIT, F_IDLE, F_REF, F_LMR, F_WACT, F_WBURST, F_RACT, F_RCMD, F_RDATA, F_WAIT
  } fstate_e;

  fstate_e   st;
  logic [4:0] wcnt;      // NOP cycles left in F_WAIT / before the column command
  logic [4:0] cnt;       // beat / cycle counter inside a burst
  sd_addr_t  addr_q;     // address of the burst in progress
  logic [4:0] rd_first;  // cycle (from READ) of the first read beat

  assign rd_first = 5'(cas_lat) + 5'(IO_LAT);

  // command slot and strobes
  always_comb begin
    slot       = '{cmd: CMD_NOP, asel: ASEL_NONE, addr: addr_q, drive: 1'b0, wdata: wr_data};
    ref_ack    = 1'b0;
    lmr_issued = 1'b0;
    wr_beat    = 1'b0;
    wr_done    = 1'b0;
    rd_grant   = 1'b0;
    rd_beat    = 1'b0;
    rd_data    = dq_q;
    unique case (st)
      F_INIT: begin
        slot.cmd   = init_cmd;
        slot.asel  = init_asel;
        lmr_issued = (init_cmd == CMD_LMR);
      end
      F_IDLE: begin
        if (ref_req) begin
          slot.cmd = CMD_REFRESH;
          ref_ack  = 1'b1;
        end else if (lmr_req) begin
          slot.cmd   = CMD_LMR;
          slot.asel  = ASEL_MODE;
          lmr_issued = 1'b1;
        end else if (wr_req) begin
          slot.cmd  = CMD_ACTIVE;
          slot.asel = ASEL_ROW;
          slot.addr = wr_addr;
        end else if (rd_req) begin
          slot.cmd  = CMD_ACTIVE;
          slot.asel = ASEL_ROW;
          slot.addr = rd_addr;
          rd_grant  = 1'b1;
        end
      end
      F_WBURST: begin
        if (wcnt == '0) begin
          slot.drive = 1'b1;
          wr_beat    = 1'b1;
          if (cnt == '0) begin
            slot.cmd  = CMD_WRITE;
            slot.asel = ASEL_COL;
          end
          wr_done = (cnt == 5'(SD_BURST - 1));
        end
      end
      F_RCMD: begin
        if (wcnt == '0) begin
          slot.cmd  = CMD_READ;
          slot.asel = ASEL_COL;
        end
      end
      F_RDATA: begin
        rd_beat = (cnt >= rd_first) && (cnt < rd_first + 5'(SD_BURST));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= F_INIT;
      wcnt   <= '0;
      cnt    <= '0;
      addr_q <= '0;
    end else begin
      unique case (st)
        F_INIT: if (init_done) st <= F_IDLE;
        F_IDLE: begin
          cnt <= '0;
          if (ref_req) begin
            st <= F_WAIT; wcnt <= 5'(T_RFC - 2);
          end else if (lmr_req) begin
            st <= F_WAIT; wcnt <= 5'(T_MRD - 2);
          end else if (wr_req) begin
            st <= F_WBURST; wcnt <= 5'(T_RCD - 1); addr_q <= wr_addr;
          end else if (rd_req) begin
            st <= F_RCMD; wcnt <= 5'(T_RCD - 1); addr_q <= rd_addr;
          end
        end
        F_WBURST: begin
          if (wcnt != '0) wcnt <= wcnt - 1'b1;
          else begin
            cnt <= cnt + 1'b1;
            if (cnt == 5'(SD_BURST - 1)) begin
              st <= F_WAIT; wcnt <= 5'(T_WR + T_RP - 1);
            end
          end
        end
        F_RCMD: begin
          if (wcnt != '0) wcnt <= wcnt - 1'b1;
          else begin
            st <= F_RDATA; cnt <= 5'd1;
          end
        end
        F_RDATA: begin
          cnt <= cnt + 1'b1;
          if (cnt == rd_first + 5'(SD_BURST - 1)) st <= F_IDLE;
        end
        F_WAIT: begin
          if (wcnt == '0) st <= F_IDLE;
          else            wcnt <= wcnt - 1'b1;
        end
        default: st <= F_IDLE;
      endcase
    end
  end
endmodule
