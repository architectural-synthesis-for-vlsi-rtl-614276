// tb_bus_interconnect: random control words and unit outputs; every routing
// output (register-file addresses with and without indexing, FU operands,
// write-bus sources, register writes, I/O controls) is compared with a
// reference written from the microcode word layout.
`timescale 1ns/1ps
module tb_bus_interconnect;
  import nnp_pkg::*;
  logic clk = 0, rst_n = 0;
  rd_word_t rd = '0;
  wr_word_t wr = '0;
  logic [RF_AW-1:0] idx_off = '0;
  logic [RF_AW-1:0] rf_raddr [NB];
  word_t rf_rdata [NB];
  logic rf_we [NB];
  logic [RF_AW-1:0] rf_waddr [NB];
  word_t rf_wdata [NB];
  fu_op_e fu_op [NFU];
  logic [LR_W-1:0] fu_lr [NFU];
  word_t fu_in1 [NFU], fu_in2 [NFU], fu_dout [NFU];
  logic fu_dvalid [NFU];
  logic in_cap [NIN];
  word_t in_dout [NIN];
  logic out_en [NOUT];
  word_t out_din [NOUT];
  word_t rbus [NB], wbus [NB];
  word_t exp_w [NB];
  int checks = 0, failures = 0, idx_used = 0;

  bus_interconnect dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int f = 0; f < NFU; f++) begin fu_dout[f] = '0; fu_dvalid[f] = 1; end
    for (int b = 0; b < NB; b++) rf_rdata[b] = '0;
    for (int i = 0; i < NIN; i++) in_dout[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      idx_off = RF_AW'($urandom % 64);
      for (int b = 0; b < NB; b++) begin
        rd.bus[b].addr = RF_AW'($urandom);
        rd.bus[b].idx  = $urandom % 2;
        rf_rdata[b]    = word_t'($urandom);
        wr.bus[b].src  = SRC_W'($urandom % NSRC);
        wr.bus[b].we   = $urandom % 2;
        wr.bus[b].addr = RF_AW'($urandom);
      end
      for (int f = 0; f < NFU; f++) begin
        rd.fu[f].op   = fu_op_e'($urandom % 12);
        rd.fu[f].lr   = LR_W'($urandom);
        rd.fu[f].sel1 = BSEL_W'($urandom % NB);
        rd.fu[f].sel2 = BSEL_W'($urandom % NB);
        fu_dout[f]    = word_t'($urandom);
      end
      for (int i = 0; i < NIN; i++) begin
        rd.in_cap[i] = $urandom % 2;
        in_dout[i]   = word_t'($urandom);
      end
      for (int o = 0; o < NOUT; o++) begin
        wr.outp[o].en  = $urandom % 2;
        wr.outp[o].sel = BSEL_W'($urandom % NB);
      end
      #1;
      for (int b = 0; b < NB; b++) begin
        int s;
        s = int'(wr.bus[b].src);
        exp_w[b] = (s == 0) ? '0 : (s <= NFU) ? fu_dout[s-1] : in_dout[s-NFU-1];
        if (rd.bus[b].idx && idx_off != 0) idx_used++;
        chk(rf_raddr[b] == RF_AW'(rd.bus[b].addr + (rd.bus[b].idx ? idx_off : 0)), "raddr");
        chk(rbus[b] == rf_rdata[b], "rbus");
        chk(wbus[b] == exp_w[b] && rf_wdata[b] == exp_w[b], "wbus");
        chk(rf_we[b] == wr.bus[b].we && rf_waddr[b] == wr.bus[b].addr, "rf write");
      end
      for (int f = 0; f < NFU; f++) begin
        chk(fu_op[f] == rd.fu[f].op && fu_lr[f] == rd.fu[f].lr, "fu op");
        chk(fu_in1[f] == rf_rdata[rd.fu[f].sel1] && fu_in2[f] == rf_rdata[rd.fu[f].sel2], "fu operands");
      end
      for (int i = 0; i < NIN; i++) chk(in_cap[i] == rd.in_cap[i], "in_cap");
      for (int o = 0; o < NOUT; o++)
        chk(out_en[o] == wr.outp[o].en && out_din[o] == exp_w[wr.outp[o].sel], "out");
      @(negedge clk);
    end
    chk(idx_used > 0, "indexed addressing never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
