// tb_wta_comparator: random winner-take-all searches of 1..12 candidates with
// random strides, checked against a reference: the running maximum on dout in
// every issue cycle and the winner's block offset (candidate index * stride,
// first one kept on ties) on win_addr after the search.
`timescale 1ns/1ps
module tb_wta_comparator;
  import nnp_pkg::*;
  logic clk = 0, rst_n = 0, dvalid;
  fu_op_e op = OP_NOP;
  word_t in1 = '0, in2 = '0, dout, best;
  logic [RF_AW-1:0] win_addr, win, stride;
  int checks = 0, failures = 0, changes = 0;
  wta_comparator dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 300; s++) begin
      int n;
      n = 1 + $urandom % 12;
      stride = RF_AW'(1 + $urandom % 20);
      for (int k = 0; k < n; k++) begin
        op = (k == 0) ? OP_CMP_FIRST : OP_CMP_NEXT;
        in1 = word_t'(($urandom % 64) - 32);
        in2 = (k == 0) ? word_t'(stride) : word_t'($urandom);
        if (k == 0 || $signed(in1) > $signed(best)) begin
          if (k != 0) changes++;
          best = in1; win = RF_AW'(k * stride);
        end
        #1;
        checks++;
        if (!dvalid || dout != best) begin
          failures++;
          if (failures < 10) $display("FAIL s=%0d k=%0d dout=%h exp %h", s, k, dout, best);
        end
        @(negedge clk);
      end
      op = OP_NOP;
      #1;
      checks++;
      if (win_addr != win || dvalid) begin
        failures++;
        if (failures < 10) $display("FAIL s=%0d win_addr=%0d exp %0d", s, win_addr, win);
      end
      @(negedge clk);
    end
    checks++;
    if (changes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
