// tb_cla_adder: checks the 25-bit prefix adder's sum, carry out and signed
// overflow flag against plain integer arithmetic, for corner and random
// operands with both carry-in values.
module tb_cla_adder;
  logic [24:0] a, b, sum;
  logic cin, cout, ovf;
  int checks = 0, failures = 0;

  cla_adder #(.W(25)) dut (.a, .b, .cin, .sum, .cout, .ovf);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [24:0] av, input logic [24:0] bv, input logic c);
    logic [25:0] full;
    logic        eovf;
    a = av; b = bv; cin = c;
    #1;
    full = {1'b0, av} + {1'b0, bv} + 26'(c);
    eovf = (av[24] == bv[24]) && (full[24] != av[24]);
    checks++;
    if (sum !== full[24:0] || cout !== full[25] || ovf !== eovf) begin
      failures++;
      $display("FAIL %h + %h + %b -> %h c%b v%b, expected %h c%b v%b", av, bv, c, sum, cout, ovf,
               full[24:0], full[25], eovf);
    end
  endtask

  initial begin
    check(25'h0, 25'h0, 0);
    check(25'h1ffffff, 25'h1, 0);
    check(25'h0ffffff, 25'h1, 0);
    check(25'h1000000, 25'h1000000, 0);
    check(25'h1ffffff, 25'h0, 1);
    check(25'h0aaaaaa, 25'h0555555, 1);
    for (int i = 0; i < 3000; i++) check(25'($urandom), 25'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
