// tb_adc_capture: drives eight converter models, each updating its byte on its
// own encode clock with a running sample number (converter k, frame n gives
// byte 8n+k, 8 bits), and checks that every output word holds eight
// consecutive samples in order, one word per 8 ns.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_adc_capture;
  int checks = 0, failures = 0;
  logic [7:0] ph = 0;
  logic rst_n = 0;
  logic [7:0][7:0] adc_d;
  logic [63:0] word;
  logic word_valid;
  for (genvar k = 0; k < 8; k++) begin : g
    initial begin #(k); forever begin #4 ph[k] = 1; #4 ph[k] = 0; end end
    int n = 0;
    // converter: new sample on each encode rising edge, 2 ns output delay
    always @(posedge ph[k]) begin #2 adc_d[k] = 8'(8*n + k); n++; end
  end
  initial adc_d = '0;
  adc_capture dut (.clk_ph(ph), .rst_n, .adc_d, .word, .word_valid);
  `WATCHDOG(ph[0], 200)
  int nwords = 0;
  realtime last_t = 0;
  initial begin
    #30 rst_n = 1;
    repeat (3) @(posedge ph[0]);
    `CHECK(word_valid, "valid after reset")
    repeat (40) begin
      @(posedge ph[0]); #0.5;
      for (int k = 1; k < 8; k++)
        `CHECK(word[8*k +: 8] == 8'(word[7:0] + k), $sformatf("byte %0d follows byte 0 (%h)", k, word))
      if (nwords > 0) `CHECK(word[7:0] == 8'(last_t), "next word starts 8 samples later")
      last_t = real'(8'(word[7:0] + 8));
      nwords++;
    end
    `TB_DONE
  end
endmodule
