// tb_acq_ctrl: record sequencing. Sample words are a running counter. Checks:
// nothing is stored before the trigger; the word of the trigger cycle is the
// first stored; exactly rec_len (rounded down to 4) words follow in order;
// dual mode takes a CH1 record, switches the selector, waits SETTLE cycles and
// its own trigger, then takes a CH2 record; a FIFO without room sets overflow and
// drops whole 4-word groups without shortening the record in time.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_acq_ctrl;
  import daq_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;
  logic arm = 0, dual = 0, ch_single = 0, trig_evt = 0, fifo_afull = 0;
  logic [31:0] rec_len = 0;
  logic [63:0] word = 0;
  logic word_valid = 1;
  logic fifo_wr, ch_sel, busy, done, overflow;
  logic [63:0] fifo_wdata;
  acq_ctrl #(.SETTLE(6)) dut (.clk, .rst_n, .arm, .dual, .ch_single, .rec_len, .trig_evt,
    .word, .word_valid, .fifo_afull, .fifo_wr, .fifo_wdata, .ch_sel, .busy, .done, .overflow);
  always @(posedge clk) word <= word + 1;
  logic [63:0] stored [$];
  logic        stored_ch [$];
  always @(posedge clk) if (fifo_wr) begin stored.push_back(fifo_wdata); stored_ch.push_back(ch_sel); end
  `WATCHDOG(clk, 3000)

  task automatic pulse_trig(output logic [63:0] w);
    @(negedge clk); trig_evt = 1; w = word; @(negedge clk); trig_evt = 0;
  endtask

  initial begin
    logic [63:0] w0, w1;
    int t_sw;
    repeat (3) @(negedge clk); rst_n = 1;
    // single record, CH2, length 22 -> 20 words
    rec_len = 22; ch_single = 1;
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    repeat (30) @(negedge clk);
    `CHECK(stored.size() == 0 && busy && !done, "nothing stored before the trigger")
    pulse_trig(w0);
    repeat (30) @(negedge clk);
    `CHECK(stored.size() == 20, $sformatf("20 words stored, got %0d", stored.size()))
    for (int i = 0; i < stored.size(); i++) `CHECK(stored[i] == w0 + i, "words in order from the trigger word")
    `CHECK(stored_ch[0] == 1 && ch_sel, "CH2 selected")
    `CHECK(done && !busy && !overflow, "done, no overflow")
    // dual record, length 8 each
    stored.delete(); stored_ch.delete();
    rec_len = 8; dual = 1;
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    `CHECK(!done && ch_sel == 0, "dual starts on CH1")
    repeat (10) @(negedge clk);
    pulse_trig(w0);
    wait (ch_sel == 1); t_sw = $time;
    repeat (2) @(negedge clk);
    pulse_trig(w1);                         // inside the settle window: ignored
    repeat (10) @(negedge clk);
    `CHECK(stored.size() == 8, "one record before the CH2 trigger")
    pulse_trig(w1);
    repeat (12) @(negedge clk);
    `CHECK(stored.size() == 16, $sformatf("two records, got %0d", stored.size()))
    for (int i = 0; i < 8; i++) begin
      `CHECK(stored[i] == w0 + i && stored_ch[i] == 0, "CH1 record")
      `CHECK(stored[8+i] == w1 + i && stored_ch[8+i] == 1, "CH2 record")
    end
    `CHECK(done, "dual done")
    // overflow
    stored.delete(); dual = 0; rec_len = 12;
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    repeat (8) @(negedge clk);
    pulse_trig(w0);
    // words 0..11 at the following edges; the FIFO reports no room from
    // just before word 3 (inside group 0: ignored) until after word 5, so
    // group 1 (words 4..7) is dropped whole
    repeat (2) @(negedge clk); fifo_afull = 1;
    repeat (3) @(negedge clk); fifo_afull = 0;
    repeat (10) @(negedge clk);
    `CHECK(overflow && done, "overflow flagged")
    `CHECK(stored.size() == 8, $sformatf("group of 4 of 12 words dropped, stored %0d", stored.size()))
    `CHECK(stored[3] == w0 + 3, "group started with room is kept whole")
    `CHECK(stored[4] == w0 + 8, "whole group dropped")
    `CHECK(stored[7] == w0 + 11, "record keeps its length in time")
    `TB_DONE
  end
endmodule
