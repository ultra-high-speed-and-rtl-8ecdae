// cdc_sync: two-flop synchronizer for a bus of slow level signals (or a
// toggle) crossing into the clock domain of clk. Each bit is sampled
// independently, so a multi-bit value must be quasi-static when it is read.
// Latency: two clk edges.
`timescale 1ns/1ps
module cdc_sync #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
