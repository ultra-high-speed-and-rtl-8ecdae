// trigger_detect: turns the trigger comparator output (TrigP after ECL to
// LVTTL level conversion) into a one-cycle trigger event in the 125 MHz
// sample-word clock domain. The comparator output is asynchronous to the
// FPGA clocks, so it passes a two-flop synchronizer and a rising-edge
// detector: trig_evt is high for exactly one clk cycle, three clk edges after
// the comparator output rises (two synchronizer stages plus the edge
// register). The trigger point is therefore resolved to one sample word
// (8 ns); the stages and the rising-edge choice are this design's own.
`timescale 1ns/1ps
module trigger_detect (
  input  logic clk,
  input  logic rst_n,
  input  logic trig_in,     // level-converted comparator output
  output logic trig_evt     // one-cycle pulse per rising edge
);
  logic s1, s2, s3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s1, s2, s3} <= '0;
      trig_evt     <= 1'b0;
    end else begin
      s1       <= trig_in;
      s2       <= s1;
      s3       <= s2;
      trig_evt <= s2 & ~s3;
    end
  end
endmodule
