// tb_regfile: random datapath and host traffic against a reference array.
// Checks the asynchronous reads of both ports, write-at-edge timing and that
// a host write takes priority: the datapath write of that cycle is dropped.
`timescale 1ns/1ps
module tb_regfile;
  localparam int WORDS = 512, W = 16, AW = 9;
  logic clk = 0;
  logic [AW-1:0] raddr = '0, waddr = '0, host_addr = '0;
  logic [W-1:0] rdata, wdata = '0, host_wdata = '0, host_rdata;
  logic we = 0, host_we = 0;
  logic [W-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    // initialise through the host port
    for (int a = 0; a < WORDS; a++) ref_mem[a] = W'(a * 37);
    for (int a = 0; a < WORDS; a++) begin
      host_we = 1; host_addr = AW'(a); host_wdata = ref_mem[a];
      @(negedge clk);
    end
    host_we = 0;
    for (int i = 0; i < 3000; i++) begin
      raddr = AW'($urandom); host_addr = AW'($urandom % 8);
      we = $urandom % 2; waddr = AW'($urandom % 8); wdata = W'($urandom);
      host_we = ($urandom % 4) == 0; host_wdata = W'($urandom);
      if (i % 3 == 0) raddr = waddr;
      #1;
      checks += 2;
      if (rdata != ref_mem[raddr] || host_rdata != ref_mem[host_addr]) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d raddr=%0d got %h exp %h", i, raddr, rdata, ref_mem[raddr]);
      end
      @(posedge clk);
      if (host_we) ref_mem[host_addr] = host_wdata;
      else if (we) ref_mem[waddr] = wdata;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
