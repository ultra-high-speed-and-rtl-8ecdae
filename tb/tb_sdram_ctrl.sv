// tb_sdram_ctrl: self-checking test of the SDRAM controller against the
// behavioural SDRAM model. A testbench FIFO offers NW 64-bit words; the test
// waits for initialisation, lets the controller write them all, reads them
// back through the readback port and compares every beat (low half of word i
// is beat 2i, high half 2i+1). It then changes the CAS latency to 3 (a LOAD
// MODE REGISTER must follow), reads part of the data again at an odd burst
// address, and checks that refreshes happened, the model saw no rule break and
// a write burst took the expected 14 clocks (ACTIVE, tRCD, 8 beats, tWR+tRP).
`timescale 1ns/1ps
module tb_sdram_ctrl;
  import daq_pkg::*;
  localparam int NW = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [WORD_W-1:0] src [NW];
  int               head;
  logic [WORD_W-1:0] fifo_rdata;
  logic [12:0]       fifo_count;
  logic              fifo_rd_en;
  logic              mode_wr = 0, wr_clear = 0, rd_load = 0, rb_pop = 0;
  logic [1:0]        mode_wdata = 2;
  logic [SD_LIN_W-1:0] rd_start = 0;
  logic [SD_LIN_W:0]   rd_len = 0;
  logic [31:0]       rb_data;
  logic              rb_empty, rd_busy, init_done;
  logic [5:0]        rb_count;
  logic [SD_LIN_W:0] wr_beats;
  logic [1:0]        cas_lat;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [1:0]  sd_ba;
  logic [12:0] sd_a;
  logic [3:0]  sd_dqm;
  logic [31:0] sd_dq_o, sd_dq_i;
  int avail;   // words the testbench FIFO makes visible

  assign fifo_rdata = src[head % NW];
  assign fifo_count = 13'(avail - head);

  sdram_ctrl #(.PWRUP(50), .T_REFI(300)) dut (
    .clk, .rst_n, .fifo_rdata, .fifo_count, .fifo_rd_en,
    .mode_wr, .mode_wdata, .wr_clear, .rd_load, .rd_start, .rd_len,
    .rb_pop, .rb_data, .rb_empty, .rb_count, .rd_busy, .init_done, .wr_beats, .cas_lat,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a, .sd_dqm,
    .sd_dq_o, .sd_dq_oe, .sd_dq_i);

  sdram_model mem (.clk, .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n),
    .we_n(sd_we_n), .ba(sd_ba), .a(sd_a), .dq_in(sd_dq_o), .dq_oe(sd_dq_oe), .dq_out(sd_dq_i));

  always_ff @(posedge clk) if (fifo_rd_en) head <= head + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // read n beats starting at beat address a0 and compare
  task automatic readback(input int a0, input int n);
    int got = 0;
    @(negedge clk); rd_start = SD_LIN_W'(a0); rd_len = (SD_LIN_W+1)'(n); rd_load = 1;
    @(negedge clk); rd_load = 0;
    while (got < n) begin
      @(negedge clk);
      if (!rb_empty) begin
        rb_pop = 1; @(negedge clk); rb_pop = 0;
        begin
          int b = a0 + got;
          logic [31:0] exp = b[0] ? src[b/2][63:32] : src[b/2][31:0];
          check(rb_data == exp, $sformatf("beat %0d: got %h exp %h", b, rb_data, exp));
        end
        got++;
      end
    end
  endtask

  int t_act [$];
  always @(posedge clk) if (!sd_cs_n && !sd_ras_n && sd_cas_n && sd_we_n && sd_dq_oe == 0 && dut.u_fsm.st == dut.u_fsm.F_WBURST) t_act.push_back($time);

  initial begin
    for (int i = 0; i < NW; i++) src[i] = {$urandom, $urandom};
    head = 0; avail = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    wait (init_done);
    check(mem.n_lmr == 1 && mem.n_ref == 8, "init sequence: 1 LMR and 8 refreshes");
    check(cas_lat == 2, "CAS latency 2 after init");
    avail = NW;
    wait (head == NW);
    repeat (20) @(negedge clk);
    check(wr_beats == (SD_LIN_W+1)'(2*NW), "beats written");
    readback(0, 2*NW);
    // CAS latency 3
    @(negedge clk); mode_wr = 1; mode_wdata = 3; @(negedge clk); mode_wr = 0;
    repeat (30) @(negedge clk);
    check(mem.n_lmr == 2 && cas_lat == 3 && mem.cl == 3, "runtime mode load");
    readback(24, 48);
    check(mem.n_ref > 8, "periodic refresh issued");
    check(mem.errors == 0, $sformatf("SDRAM rule breaks: %0d", mem.errors));
    check(t_act.size() >= 2, "write bursts seen");
    begin
      int min_gap = 1 << 30;
      for (int i = 1; i < t_act.size(); i++)
        if (t_act[i] - t_act[i-1] < min_gap) min_gap = t_act[i] - t_act[i-1];
      check(min_gap == 140, $sformatf("burst-to-burst spacing %0d ns, expected 140", min_gap));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
