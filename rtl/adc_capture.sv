// adc_capture: input stage for the eight time-interleaved AD9054A converters
// (the "PECL latch" of the card after level conversion). Converter k is
// clocked by encode clock clk_ph[k], which lags clk_ph[0] by k*45 degrees at
// 125 MHz, so the eight converters take eight successive 1 ns samples of the
// same input. Each converter's byte is first latched on its own clock phase;
// on the next rising edge of clk_ph[0] the eight latches are read together
// into one 64-bit word, sample k in bits [8k+7:8k] (byte 0 oldest). The
// latch of phase 0 is read in the same edge that reloads it, so the word
// holds samples k = 0..7 of one 8 ns frame. The bytes are stored as the
// converters deliver them (their output format is set on the converters).
// Timing: word_valid rises two clk_ph[0] edges after reset and stays high;
// a new word every clk_ph[0] cycle (125 M words/s = 1 GS/s).
`timescale 1ns/1ps
module adc_capture
  import daq_pkg::*;
#(
  parameter int unsigned N = N_ADC,
  parameter int unsigned SW = SAMPLE_W
) (
  input  logic [N-1:0]          clk_ph,     // encode clocks, clk_ph[0] is the word clock
  input  logic                  rst_n,      // synchronous to clk_ph[0], active low
  input  logic [N-1:0][SW-1:0]  adc_d,      // converter outputs
  output logic [N*SW-1:0]       word,
  output logic                  word_valid
);
  logic [N-1:0][SW-1:0] lat;
  logic [1:0]           vcnt;

  // one register per phase, each in its own clock domain
  for (genvar k = 0; k < N; k++) begin : g_lat
    logic [SW-1:0] q;
    always_ff @(posedge clk_ph[k]) begin
      q <= adc_d[k];
    end
    assign lat[k] = q;
  end

  always_ff @(posedge clk_ph[0] or negedge rst_n) begin
    if (!rst_n) begin
      word       <= '0;
      vcnt       <= '0;
      word_valid <= 1'b0;
    end else begin
      for (int k = 0; k < N; k++) begin
        word[k*SW +: SW] <= lat[k];
      end
      if (vcnt != 2'd2) vcnt <= vcnt + 2'd1;
      word_valid <= (vcnt == 2'd2) || (vcnt == 2'd1);
    end
  end
endmodule
