// daq_pkg: types and constants shared by the 1 GS/s two-channel acquisition card.
// A sample word is eight 8-bit samples taken by the eight time-interleaved ADCs
// in one 125 MHz period; sample k (ADC k, clock phase k*45 degrees) sits in
// bits [8k+7:8k], so byte 0 is the oldest sample. The SDRAM bus is 32 bits wide
// (two x16 devices side by side), so a sample word takes two SDRAM beats, low
// half first. The SDRAM command encoding is the JEDEC {CS#,RAS#,CAS#,WE#} one.
// The register map of the host-visible logic controller is defined here too;
// it is this design's own choice, not taken from the card's documentation.
`timescale 1ns/1ps
package daq_pkg;

  localparam int unsigned N_ADC      = 8;   // interleaved converters
  localparam int unsigned SAMPLE_W   = 8;   // AD9054A resolution
  localparam int unsigned WORD_W     = N_ADC * SAMPLE_W;  // 64-bit sample word
  localparam int unsigned SD_DQ_W    = 32;  // SDRAM data bus
  localparam int unsigned SD_BA_W    = 2;
  localparam int unsigned SD_ROW_W   = 13;
  localparam int unsigned SD_COL_W   = 10;
  localparam int unsigned SD_ADDR_W  = 13;
  localparam int unsigned SD_LIN_W   = SD_BA_W + SD_ROW_W + SD_COL_W;  // 25: 32M beats x 4 B = 128 MB
  localparam int unsigned SD_BURST   = 8;   // beats per SDRAM burst

  // SDRAM command {cs_n, ras_n, cas_n, we_n}
  typedef enum logic [3:0] {
    CMD_NOP       = 4'b0111,
    CMD_ACTIVE    = 4'b0011,
    CMD_READ      = 4'b0101,
    CMD_WRITE     = 4'b0100,
    CMD_PRECHARGE = 4'b0010,
    CMD_REFRESH   = 4'b0001,
    CMD_LMR       = 4'b0000,
    CMD_DESELECT  = 4'b1111
  } sd_cmd_e;

  // what the address/data selector puts on the address pins
  typedef enum logic [2:0] {
    ASEL_NONE = 3'd0,   // address don't care (driven 0)
    ASEL_ROW  = 3'd1,   // bank + row (ACTIVE)
    ASEL_COL  = 3'd2,   // bank + column, A10 = 1: auto precharge (READ/WRITE)
    ASEL_MODE = 3'd3,   // mode register word (LOAD MODE REGISTER)
    ASEL_PALL = 3'd4    // A10 = 1: PRECHARGE ALL banks
  } asel_e;

  // split SDRAM address
  typedef struct packed {
    logic [SD_ROW_W-1:0] row;
    logic [SD_BA_W-1:0]  ba;
    logic [SD_COL_W-1:0] col;
  } sd_addr_t;

  // one command slot from the central controller to the address/data selector
  typedef struct packed {
    sd_cmd_e              cmd;
    asel_e                asel;
    sd_addr_t             addr;
    logic                 drive;   // write data on the bus this cycle
    logic [SD_DQ_W-1:0]   wdata;
  } sd_slot_t;

  // host register map (byte offsets inside BAR0)
  localparam logic [7:0] REG_CTRL      = 8'h00;  // [0] arm (pulse) [1] dual [2] channel [3] readback start (pulse)
  localparam logic [7:0] REG_STATUS    = 8'h04;
  localparam logic [7:0] REG_REC_LEN   = 8'h08;  // sample words per record (multiple of 4)
  localparam logic [7:0] REG_RELAY     = 8'h0C;  // attenuator relays, [3:0] CH1, [7:4] CH2
  localparam logic [7:0] REG_OFFSET    = 8'h10;  // offset DAC codes, [11:0] CH1, [27:16] CH2
  localparam logic [7:0] REG_TRIG_LVL  = 8'h14;  // trigger level DAC code [11:0]
  localparam logic [7:0] REG_SD_MODE   = 8'h18;  // SDRAM CAS latency [1:0] (2 or 3)
  localparam logic [7:0] REG_RD_ADDR   = 8'h1C;  // readback start, 32-bit beat address
  localparam logic [7:0] REG_RD_LEN    = 8'h20;  // readback length in 32-bit beats (multiple of 8)
  localparam logic [7:0] REG_DATA      = 8'h24;  // readback data port
  localparam logic [7:0] REG_WR_COUNT  = 8'h28;  // 32-bit beats written to SDRAM since arm

endpackage
