// tb_ucode_controller: loads random microcode of random lengths, runs it and
// checks that the controller issues word k in the k-th busy cycle, stays busy
// for exactly the program length, pulses done once and issues zero words
// while idle. A start while running and a zero length are also tried.
`timescale 1ns/1ps
module tb_ucode_controller;
  import nnp_pkg::*;
  localparam int MAXL = 40;
  logic clk = 0, rst_n = 0, start = 0, busy, done, prog_we = 0;
  logic [UA_W-1:0] prog_addr = '0;
  rd_word_t prog_rd = '0, rd_word;
  wr_word_t prog_wr = '0, wr_word;
  logic [UA_W:0] prog_len = '0;
  rd_word_t m_rd [MAXL];
  wr_word_t m_wr [MAXL];
  int checks = 0, failures = 0;

  ucode_controller dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      int len, dones;
      len = (r == 0) ? 0 : 1 + $urandom % MAXL;
      for (int k = 0; k < MAXL; k++) begin
        for (int j = 0; j < $bits(rd_word_t); j += 32) m_rd[k][j +: 32] = $urandom;
        for (int j = 0; j < $bits(wr_word_t); j += 32) m_wr[k][j +: 32] = $urandom;
        prog_we = 1; prog_addr = UA_W'(k); prog_rd = m_rd[k]; prog_wr = m_wr[k];
        @(negedge clk);
      end
      prog_we = 0;
      prog_len = (UA_W + 1)'(len);
      chk(!busy && rd_word == '0 && wr_word == '0, "idle words not zero");
      start = 1;
      @(negedge clk);
      start = 0;
      dones = 0;
      for (int k = 0; k < len; k++) begin
        if (k == 2) start = 1;              // ignored while running
        chk(busy, "not busy during run");
        chk(rd_word == m_rd[k] && wr_word == m_wr[k], "wrong word issued");
        @(negedge clk);
        start = 0;
        if (done && k < len - 1) dones++;
      end
      chk(!busy, "still busy after program");
      if (len > 0) chk(done, "no done pulse");
      @(negedge clk);
      chk(!done && !busy, "done longer than one cycle");
      chk(dones == 0 || len == 0, "early done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
