// sdram_mode_reg: the SDRAM controller's control mode register. It holds the
// CAS latency the host asked for (2 or 3; any other value is ignored) and
// forms the JEDEC mode-register word for the LOAD MODE REGISTER command:
// burst length 8 (A[2:0] = 011), sequential bursts (A3 = 0), CAS latency in
// A[6:4], programmed burst writes (A9 = 0). A host write made after
// initialisation raises lmr_req until the central controller issues the
// command (lmr_issued); cas_lat, the latency the read path must use, follows
// the register only when a LOAD MODE REGISTER is actually issued, so it always
// matches the devices. Only the CAS latency is host-configurable: burst length
// 8 is fixed because the data-block management is built around it.
`timescale 1ns/1ps
module sdram_mode_reg
  import daq_pkg::*;
#(
  parameter logic [1:0] CL_RESET = 2'd2     // CAS latency after reset (100 MHz)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr,          // host write strobe
  input  logic [1:0]           wdata,       // requested CAS latency
  input  logic                 init_done,
  input  logic                 lmr_issued,  // LOAD MODE REGISTER on the bus this cycle
  output logic                 lmr_req,
  output logic [SD_ADDR_W-1:0] mode_word,
  output logic [1:0]           cas_lat      // latency in force in the devices
);
  logic [1:0] cl_pend;

  assign mode_word = {3'b000, 1'b0, 2'b00, 1'b0, cl_pend, 1'b0, 3'b011};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cl_pend <= CL_RESET;
      cas_lat <= CL_RESET;
      lmr_req <= 1'b0;
    end else begin
      if (lmr_issued) begin
        cas_lat <= cl_pend;
        lmr_req <= 1'b0;
      end
      if (wr && (wdata == 2'd2 || wdata == 2'd3)) begin
        cl_pend <= wdata;
        if (init_done) lmr_req <= 1'b1;
      end
    end
  end
endmodule
