// sdram_refresh: the SDRAM controller's refresh module. Once initialisation
// is done it counts T_REFI clock cycles (7.8 us at 100 MHz: 8192 rows every
// 64 ms, with margin) and adds one owed refresh each time. ref_req is high
// while at least one refresh is owed; the central controller issues AUTO
// REFRESH when it next goes idle and pulses ref_ack. Up to MAX_OWED refreshes
// can be owed, so a long burst of traffic delays refreshes without losing
// them. The interval is a common data-sheet value, not one from the card's
// documentation.
`timescale 1ns/1ps
module sdram_refresh #(
  parameter int unsigned T_REFI   = 780,
  parameter int unsigned MAX_OWED = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,     // initialisation done
  input  logic ref_ack,    // AUTO REFRESH issued
  output logic ref_req
);
  logic [$clog2(T_REFI)-1:0]     tcnt;
  logic [$clog2(MAX_OWED+1)-1:0] owed;
  logic                          tick;

  assign tick    = enable && (tcnt == ($clog2(T_REFI))'(T_REFI - 1));
  assign ref_req = (owed != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt <= '0;
      owed <= '0;
    end else begin
      if (!enable || tick) tcnt <= '0;
      else                 tcnt <= tcnt + 1'b1;
      unique case ({tick && owed != ($clog2(MAX_OWED+1))'(MAX_OWED), ref_ack && owed != '0})
        2'b10:   owed <= owed + 1'b1;
        2'b01:   owed <= owed - 1'b1;
        default: ;
      endcase
    end
  end
endmodule
