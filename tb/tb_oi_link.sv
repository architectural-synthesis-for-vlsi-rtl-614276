// tb_oi_link: random words through the default one-cycle link; each word and
// its valid bit must come out exactly DELAY cycles later.
`timescale 1ns/1ps
module tb_oi_link;
  import nnp_pkg::*;
  localparam int DELAY = 1;
  logic clk = 0, rst_n = 0, din_valid = 0, dout_valid;
  word_t din = '0, dout;
  word_t hist_d [DELAY+1];
  bit    hist_v [DELAY+1];
  int checks = 0, failures = 0;
  oi_link dut (.*);
  always #5 clk = ~clk;
  initial begin
    for (int k = 0; k <= DELAY; k++) begin hist_d[k] = '0; hist_v[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      din = word_t'($urandom); din_valid = $urandom % 2;
      @(posedge clk);
      for (int k = DELAY; k > 0; k--) begin hist_d[k] = hist_d[k-1]; hist_v[k] = hist_v[k-1]; end
      hist_d[0] = din; hist_v[0] = din_valid;
      @(negedge clk);
      checks++;
      if (dout != hist_d[DELAY-1] || dout_valid != hist_v[DELAY-1]) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d got %h/%b", i, dout, dout_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
