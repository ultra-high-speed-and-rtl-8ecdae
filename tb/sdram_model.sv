// sdram_model: behavioural model (testbench only) of the card's SDRAM, two
// x16 devices side by side seen as one 32-bit memory. It decodes the command
// pins on every rising clock edge, keeps the mode register (CAS latency,
// burst length 8), the open row of each bank, and the data in a sparse
// associative array. READ data is driven so that the controller samples beat i
// at the edge cas_lat + i edges after the READ edge; WRITE takes beat 0 with
// the command and beats 1..7 on the next edges. READ/WRITE with A10 close the
// bank. Rule breaks are counted in errors: a command before the power-up
// PRECHARGE ALL, ACTIVE to an open bank, READ/WRITE to a closed bank or a
// wrong row, REFRESH with a bank open, a mode word other than burst length 8.
`timescale 1ns/1ps
module sdram_model (
  input  logic        clk,
  input  logic        cke,
  input  logic        cs_n,
  input  logic        ras_n,
  input  logic        cas_n,
  input  logic        we_n,
  input  logic [1:0]  ba,
  input  logic [12:0] a,
  input  logic [31:0] dq_in,
  input  logic        dq_oe,
  output logic [31:0] dq_out
);
  logic [31:0] mem [int];
  logic [3:0]  open_b;
  logic [12:0] row_b [4];
  int          cl;
  int          errors, n_ref, n_lmr, n_act, n_rd, n_wr, n_pre;
  bit          inited;
  int          wr_left, wr_lin;
  bit          sv [16];
  int          sa [16];

  initial begin
    open_b = '0; cl = 3; errors = 0; n_ref = 0; n_lmr = 0; n_act = 0; n_rd = 0; n_wr = 0;
    n_pre = 0; inited = 0; wr_left = 0; dq_out = '0;
    for (int i = 0; i < 16; i++) begin sv[i] = 0; sa[i] = 0; end
  end

  function automatic int lin(input logic [1:0] b, input logic [12:0] r, input logic [9:0] c);
    return int'({r, b, c});
  endfunction

  always @(posedge clk) begin
    // read pipeline
    if (sv[0]) dq_out <= mem.exists(sa[0]) ? mem[sa[0]] : 32'h0;
    for (int j = 0; j < 15; j++) begin sv[j] = sv[j+1]; sa[j] = sa[j+1]; end
    sv[15] = 0;
    // write burst continuation
    if (wr_left > 0) begin
      if (!dq_oe) errors++;
      mem[wr_lin] = dq_in;
      wr_lin++;
      wr_left--;
    end
    if (cke && !cs_n) begin
      unique case ({ras_n, cas_n, we_n})
        3'b011: begin                                // ACTIVE
          n_act++;
          if (!inited || open_b[ba]) errors++;
          open_b[ba] = 1'b1;
          row_b[ba]  = a;
        end
        3'b101, 3'b100: begin                        // READ / WRITE
          if (!inited || !open_b[ba]) errors++;
          if (!we_n) begin
            n_wr++;
            if (!dq_oe) errors++;
            mem[lin(ba, row_b[ba], a[9:0])] = dq_in;
            wr_lin  = lin(ba, row_b[ba], a[9:0]) + 1;
            wr_left = 7;
          end else begin
            n_rd++;
            for (int i = 0; i < 8; i++) begin
              sv[cl-2+i] = 1;
              sa[cl-2+i] = lin(ba, row_b[ba], a[9:0]) + i;
            end
          end
          if (a[10]) open_b[ba] = 1'b0;
        end
        3'b010: begin                                // PRECHARGE
          n_pre++;
          inited = 1;
          if (a[10]) open_b = '0; else open_b[ba] = 1'b0;
        end
        3'b001: begin                                // AUTO REFRESH
          n_ref++;
          if (!inited || open_b != '0) errors++;
        end
        3'b000: begin                                // LOAD MODE REGISTER
          n_lmr++;
          if (!inited || open_b != '0 || a[2:0] != 3'b011) errors++;
          cl = int'(a[6:4]);
        end
        default: ;
      endcase
    end
  end
endmodule
