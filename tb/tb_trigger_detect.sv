// tb_trigger_detect: random trigger comparator waveform; checks one event per
// rising edge, none for falling edges or a held level, three clocks of latency.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_trigger_detect;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, trig_in = 0, trig_evt;
  always #4 clk = ~clk;
  trigger_detect dut (.clk, .rst_n, .trig_in, .trig_evt);
  `WATCHDOG(clk, 5000)
  logic hist [$];
  int n_rise = 0, n_evt = 0;
  always @(posedge clk) if (rst_n) begin
    hist.push_front(trig_in);
    if (hist.size() > 5) void'(hist.pop_back());
    if (hist.size() == 5) begin
      // input sampled 3 edges ago high, 4 edges ago low
      `CHECK(trig_evt == (hist[3] && !hist[4]), "event three clocks after a rising edge")
    end
    if (trig_evt) n_evt++;
  end
  initial begin
    #20 rst_n = 1;
    repeat (2000) begin
      @(negedge clk);
      if ($urandom_range(0, 5) == 0) begin
        if (!trig_in) n_rise++;
        trig_in = ~trig_in;
      end
    end
    repeat (5) @(negedge clk);
    `CHECK(n_evt == n_rise, $sformatf("%0d events for %0d rising edges", n_evt, n_rise))
    `TB_DONE
  end
endmodule
