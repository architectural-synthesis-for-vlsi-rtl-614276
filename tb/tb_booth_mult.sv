// tb_booth_mult: checks the 16 x 9 Booth multiplier against the exact signed
// product, for corner operands and random ones issued every cycle, and checks
// the one-cycle register delay (a product appears the cycle after its
// operands).
module tb_booth_mult;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [15:0] a;
  logic signed [8:0]  b;
  logic signed [24:0] p;
  int checks = 0, failures = 0;

  booth_mult #(.A_W(16), .B_W(9)) dut (.clk, .a, .b, .p);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [24:0] exp_q;
  task automatic apply(input logic signed [15:0] av, input logic signed [8:0] bv);
    a = av; b = bv;
    @(posedge clk);
    exp_q = 25'(av) * 25'(bv);
    #1;
    checks++;
    if (p !== exp_q) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d", av, bv, p, exp_q);
    end
  endtask

  initial begin
    a = 0; b = 0;
    @(posedge clk);
    apply(16'sd0, 9'sd0);
    apply(16'sd1, 9'sd1);
    apply(-16'sd1, 9'sd1);
    apply(16'sh7fff, 9'sh0ff);
    apply(16'sh8000, 9'sh100);
    apply(16'sh8000, 9'sh0ff);
    apply(16'sh7fff, 9'sh100);
    apply(16'sd256, -9'sd90);
    for (int i = 0; i < 2000; i++) apply(16'($urandom), 9'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
