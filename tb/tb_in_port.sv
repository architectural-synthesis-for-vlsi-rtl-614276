// tb_in_port: random capture pattern; the unit must pass the external word
// through in a capture cycle and hold the last captured word otherwise.
`timescale 1ns/1ps
module tb_in_port;
  import nnp_pkg::*;
  logic clk = 0, rst_n = 0, cap = 0;
  word_t ext_data = '0, dout, held;
  int checks = 0, failures = 0;
  in_port dut (.*);
  always #5 clk = ~clk;
  initial begin
    held = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      cap = $urandom % 3 == 0; ext_data = word_t'($urandom);
      #1;
      checks++;
      if (dout != (cap ? ext_data : held)) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d dout=%h", i, dout);
      end
      @(posedge clk);
      if (cap) held = ext_data;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
