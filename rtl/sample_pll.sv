// sample_pll: behavioural model (not synthesizable) of the FPGA phase-locked
// loop that makes the eight ADC encode clocks. In the card this is the vendor's
// PLL macro: it doubles the board clock and brings out eight clocks of the same
// frequency (125 MHz from a 62.5 MHz input) whose phases step by 45 degrees
// (1 ns), c[k] lagging c[0] by k*45 degrees, so that the eight converters
// sample one input in turn and together reach 1 GS/s. The model counts
// LOCK_CYCLES rising edges of inclk0 after areset falls and raises locked;
// from then on every inclk0 rising edge schedules the next MULT output periods
// of each phase with delayed assignments, so the outputs stay aligned to the
// input edges. It assumes the input period equals MULT * OUT_PERIOD_NS. The
// lock count and the 62.5 MHz input implied by the doubling are this model's
// own choices.
`timescale 1ns/1ps
module sample_pll #(
  parameter int unsigned N_PHASE       = 8,
  parameter int unsigned MULT          = 2,
  parameter realtime     OUT_PERIOD_NS = 8.0,   // 125 MHz
  parameter int unsigned LOCK_CYCLES   = 16
) (
  input  logic               inclk0,
  input  logic               areset,
  output logic [N_PHASE-1:0] c,
  output logic               locked
);
  localparam realtime STEP = OUT_PERIOD_NS / N_PHASE;
  localparam realtime HALF = OUT_PERIOD_NS / 2.0;

  logic [7:0] lock_cnt;

  always_ff @(posedge inclk0 or posedge areset) begin
    if (areset) begin
      lock_cnt <= '0;
      locked   <= 1'b0;
    end else if (lock_cnt != 8'(LOCK_CYCLES)) begin
      lock_cnt <= lock_cnt + 1'b1;
    end else begin
      locked   <= 1'b1;
    end
  end

  for (genvar k = 0; k < N_PHASE; k++) begin : g_phase
    logic [MULT-1:0] ck;      // one scheduler per output period inside an input period
    for (genvar m = 0; m < MULT; m++) begin : g_per
      localparam realtime RISE = m * OUT_PERIOD_NS + k * STEP;
      initial ck[m] = 1'b0;
      always @(posedge inclk0) begin
        if (locked) begin
          ck[m] <= #(RISE)        1'b1;
          ck[m] <= #(RISE + HALF) 1'b0;
        end
      end
    end
    assign c[k] = |ck;
  end
endmodule
