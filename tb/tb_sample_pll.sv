// tb_sample_pll: checks the PLL model: locked rises after the lock count,
// every output runs at 8 ns period with 50 % duty, and output k rises k ns
// after output 0 (45 degree steps at 125 MHz).
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_sample_pll;
  int checks = 0, failures = 0;
  logic inclk = 0, areset = 1;
  logic [7:0] c;
  logic locked;
  always #8 inclk = ~inclk;   // 62.5 MHz
  sample_pll dut (.inclk0(inclk), .areset, .c, .locked);
  realtime tr [8][$];
  realtime tf;
  for (genvar k = 0; k < 8; k++) begin : g
    always @(posedge c[k]) tr[k].push_back($realtime);
  end
  `WATCHDOG(inclk, 400)
  initial begin
    #40 areset = 0;
    `CHECK(!locked, "not locked right after reset")
    wait (locked);
    `CHECK($realtime > 40 + 16*16 - 1, "lock after 16 input cycles")
    #200;
    for (int k = 0; k < 8; k++) begin
      `CHECK(tr[k].size() >= 20, $sformatf("phase %0d runs", k))
      `CHECK(tr[k][5] - tr[k][4] == 8.0, $sformatf("phase %0d period 8 ns", k))
      `CHECK(tr[k][5] - tr[0][5] == real'(k), $sformatf("phase %0d lags %0d ns", k, k))
    end
    @(negedge c[3]); tf = $realtime; @(posedge c[3]);
    `CHECK($realtime - tf == 4.0, "50 % duty")
    `TB_DONE
  end
endmodule
