// sdram_init: the SDRAM controller's initialisation module. After reset it
// waits PWRUP cycles (200 us at 100 MHz) with NOP on the bus, then drives the
// JEDEC power-up sequence: PRECHARGE ALL, T_RP cycles, N_REF AUTO REFRESH
// commands each followed by T_RFC cycles, LOAD MODE REGISTER and T_MRD cycles;
// then init_done rises and stays high. Until then the central controller
// forwards cmd/asel to the bus unchanged (initialisation has the highest
// priority). Each wait parameter must be at least 2. The counts are common SDRAM data-sheet values, not figures from
// the card's documentation.
`timescale 1ns/1ps
module sdram_init
  import daq_pkg::*;
#(
  parameter int unsigned PWRUP = 20000,
  parameter int unsigned N_REF = 8,
  parameter int unsigned T_RP  = 2,
  parameter int unsigned T_RFC = 7,
  parameter int unsigned T_MRD = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  output sd_cmd_e cmd,
  output asel_e   asel,
  output logic    init_done
);
  typedef enum logic [2:0] {I_PWR, I_PRE, I_REF, I_LMR, I_WAIT, I_DONE} istate_e;
  istate_e     st, after_wait;
  logic [15:0] wcnt;
  logic [7:0]  rcnt;

  always_comb begin
    cmd  = CMD_NOP;
    asel = ASEL_NONE;
    unique case (st)
      I_PRE: begin cmd = CMD_PRECHARGE; asel = ASEL_PALL; end
      I_REF: cmd = CMD_REFRESH;
      I_LMR: begin cmd = CMD_LMR; asel = ASEL_MODE; end
      default: ;
    endcase
  end

  assign init_done = (st == I_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= I_PWR;
      after_wait <= I_PRE;
      wcnt       <= '0;
      rcnt       <= '0;
    end else begin
      unique case (st)
        I_PWR: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == 16'(PWRUP - 1)) st <= I_PRE;
        end
        I_PRE: begin
          st <= I_WAIT; wcnt <= 16'(T_RP - 2); after_wait <= I_REF; rcnt <= '0;
        end
        I_REF: begin
          rcnt <= rcnt + 1'b1;
          st   <= I_WAIT; wcnt <= 16'(T_RFC - 2);
          after_wait <= (rcnt == 8'(N_REF - 1)) ? I_LMR : I_REF;
        end
        I_LMR: begin
          st <= I_WAIT; wcnt <= 16'(T_MRD - 2); after_wait <= I_DONE;
        end
        I_WAIT: begin
          if (wcnt == '0) st <= after_wait;
          else            wcnt <= wcnt - 1'b1;
        end
        default: st <= I_DONE;
      endcase
    end
  end
endmodule
