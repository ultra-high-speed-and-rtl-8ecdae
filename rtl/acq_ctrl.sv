// acq_ctrl: record sequencer of the card, in the 125 MHz sample-word domain.
// After arm it selects the input channel on the analog dual-channel selector,
// waits SETTLE cycles for the selector and front end to settle, then waits
// for a trigger event; the sample word of the trigger cycle is the record's
// time zero and the first word stored. It then pushes rec_len sample words
// (rec_len rounded down to a multiple of 4, one SDRAM burst) into the sample
// FIFO. In dual mode one arm takes two records, CH1 then CH2: the selector is
// switched between them and each record waits for its own trigger, which is
// how the two inputs share one bank of converters. Overflow is handled in
// groups of 4 words (one SDRAM burst): at the first word of each group the
// FIFO is asked for room for 4 (fifo_afull low); if there is none the whole
// group is dropped and the sticky overflow flag is set. The FIFO therefore
// always holds whole bursts and the SDRAM side never waits on a partial one.
// The word count still advances over dropped groups, so a record keeps its
// length in time. done is high from the end of the last record until the
// next arm. Interface: fifo_wr/fifo_wdata push one word per cycle;
// fifo_afull (fewer than 4 free words) is sampled only at group starts.
// Channel switching per record, the settle time and the overflow policy are
// this design's choices.
`timescale 1ns/1ps
module acq_ctrl
  import daq_pkg::*;
#(
  parameter int unsigned SETTLE = 16,     // sample-word cycles (128 ns)
  parameter int unsigned LEN_W  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              arm,          // one-cycle pulse
  input  logic              dual,         // take CH1 then CH2
  input  logic              ch_single,    // channel for single mode (0 = CH1)
  input  logic [LEN_W-1:0]  rec_len,      // sample words per record
  input  logic              trig_evt,
  input  logic [WORD_W-1:0] word,
  input  logic              word_valid,
  input  logic              fifo_afull,   // fewer than 4 free words
  output logic              fifo_wr,
  output logic [WORD_W-1:0] fifo_wdata,
  output logic              ch_sel,       // to the dual-channel selector
  output logic              busy,
  output logic              done,
  output logic              overflow
);
  typedef enum logic [1:0] {S_IDLE, S_SETTLE, S_ARMED, S_CAPTURE} state_e;
  state_e            state;
  logic [LEN_W-1:0]  cnt;
  logic [LEN_W-1:0]  len4;
  logic [$clog2(SETTLE+1)-1:0] scnt;
  logic              second;              // capturing the second record of a dual pair
  logic              grp_start;           // first word of a 4-word group
  logic              keep, take;          // this group goes into the FIFO

  assign len4       = {rec_len[LEN_W-1:2], 2'b00};
  assign fifo_wdata = word;
  assign grp_start  = (state == S_ARMED && trig_evt && len4 != '0) || (state == S_CAPTURE && cnt[1:0] == 2'b00);
  assign take       = grp_start ? !fifo_afull : keep;
  assign fifo_wr    = (state == S_CAPTURE || (state == S_ARMED && trig_evt && len4 != '0)) && word_valid && take;
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      scnt     <= '0;
      second   <= 1'b0;
      keep     <= 1'b0;
      ch_sel   <= 1'b0;
      done     <= 1'b0;
      overflow <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (arm) begin
          state    <= S_SETTLE;
          scnt     <= '0;
          second   <= 1'b0;
          ch_sel   <= dual ? 1'b0 : ch_single;
          done     <= 1'b0;
          overflow <= 1'b0;
        end
        S_SETTLE: begin
          scnt <= scnt + 1'b1;
          if (scnt == ($clog2(SETTLE+1))'(SETTLE - 1)) state <= S_ARMED;
        end
        S_ARMED: if (trig_evt) begin
          if (len4 == '0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            if (fifo_afull) overflow <= 1'b1;
            keep  <= take;
            state <= S_CAPTURE;
            cnt   <= 1;
          end
        end
        S_CAPTURE: begin
          if (grp_start && fifo_afull) overflow <= 1'b1;
          keep <= take;
          cnt <= cnt + 1'b1;
          if (cnt == len4 - 1) begin
            if (dual && !second) begin
              second <= 1'b1;
              ch_sel <= 1'b1;
              scnt   <= '0;
              state  <= S_SETTLE;
            end else begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
