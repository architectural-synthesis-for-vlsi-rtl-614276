// tb_out_port: random enables; after each clock the port must show the word
// of the last enabled cycle and a one-cycle valid strobe for it.
`timescale 1ns/1ps
module tb_out_port;
  import nnp_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, ext_valid;
  word_t din = '0, ext_data, held;
  bit exp_v;
  int checks = 0, failures = 0;
  out_port dut (.*);
  always #5 clk = ~clk;
  initial begin
    held = '0; exp_v = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      en = $urandom % 2; din = word_t'($urandom);
      @(posedge clk);
      if (en) held = din;
      exp_v = en;
      @(negedge clk);
      checks++;
      if (ext_valid != exp_v || ext_data != held) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d got %h/%b exp %h/%b", i, ext_data, ext_valid, held, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
