// tb_nn_processor: one processor runs the XOR network (2 inputs, 2 hidden
// threshold neurons, 1 output neuron on 3 busses and 2 MACs) for all four
// input patterns. Checks the output value and its cycle through output unit 1,
// the 10-cycle run, and the hidden values left in the register files.
`timescale 1ns/1ps
module tb_nn_processor;
  import nnp_pkg::*;
  import tb_asm_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic prog_we = 0;
  logic [UA_W-1:0] prog_addr = '0;
  rd_word_t prog_rd = '0;
  wr_word_t prog_wr = '0;
  logic [UA_W:0] prog_len = '0;
  logic host_we = 0;
  logic [BSEL_W-1:0] host_rf = '0;
  logic [RF_AW-1:0] host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  word_t in_data [NIN];
  word_t out_data [NOUT];
  logic  out_valid [NOUT];

  nn_processor dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  rd_word_t p_rd [MAXC];
  wr_word_t p_wr [MAXC];
  int p_len;
  word_t hd [4][10];          // host data per pattern, in the order of h_rf/h_ad
  int    h_rf [10], h_ad [10];
  word_t e_z [4], e_t1 [4], e_t2 [4];

  initial begin : plan
    real xin [4][2];
    word_t w [6];
    xin = '{'{1.0, 0.0}, '{0.0, 1.0}, '{1.0, 1.0}, '{0.0, 0.0}};
    w = '{coef(-0.7), coef(0.5), coef(0.3), coef(-0.8), coef(0.4), coef(0.6)};
    clear();
    fu(0, 0, OP_MA_ACC, 0, 0, 0, 1, 0);
    fu(0, 1, OP_MA_ACC, 0, 0, 0, 2, 0);
    fu(1, 0, OP_MA_OUT, 0, 0, 1, 1, 1);
    fu(1, 1, OP_MA_OUT, 0, 0, 1, 2, 1);
    wb(3, 1, src_fu(0), 1, 2);
    wb(3, 2, src_fu(1), 1, 4);
    fu(4, 0, OP_THRESH, 0, 1, 2, 0, 2);
    fu(4, 1, OP_THRESH, 0, 2, 4, 0, 2);
    wb(4, 0, src_fu(0), 1, 3);
    wb(4, 1, src_fu(1), 1, 3);
    fu(5, 0, OP_MA_ACC, 0, 0, 3, 2, 2);
    fu(6, 0, OP_MA_OUT, 0, 1, 3, 2, 3);
    wb(8, 2, src_fu(0), 1, 5);
    fu(9, 0, OP_THRESH, 0, 2, 5, 0, 2);
    wb(9, 0, src_fu(0), 1, 4);
    outp(9, 1, 0);
    for (int c = 0; c < MAXC; c++) begin p_rd[c] = prg_rd[c]; p_wr[c] = prg_wr[c]; end
    p_len = prg_len;
    h_rf = '{0, 0, 0, 1, 1, 2, 2, 2, 2, 0};
    h_ad = '{0, 1, 2, 0, 1, 0, 1, 2, 3, 4};
    for (int k = 0; k < 4; k++) begin
      hd[k] = '{q88(xin[k][0]), q88(xin[k][1]), '0, w[0], w[1], w[2], w[3], w[4], w[5], 16'h5555};
      e_z[k]  = (xin[k][0] != xin[k][1]) ? word_t'(ONE) : '0;
      // hidden neurons of this weight set: t1 = x2 and not x1, t2 = x1 and not x2
      e_t1[k] = (xin[k][1] > 0.5 && xin[k][0] < 0.5) ? word_t'(ONE) : '0;
      e_t2[k] = (xin[k][0] > 0.5 && xin[k][1] < 0.5) ? word_t'(ONE) : '0;
    end
    checks++;
    if (p_len != 10 || asm_errors != 0) failures++;
  end

  int tcnt = 0, busy_cnt = 0, ov_t = -1;
  word_t ov_d = '0;
  always @(posedge clk) begin
    if (busy) busy_cnt++;
    if (out_valid[1]) begin ov_t = tcnt; ov_d = out_data[1]; end
    tcnt = start ? 0 : tcnt + 1;
  end

  initial begin : drive
    for (int i = 0; i < NIN; i++) in_data[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < p_len; c++) begin
      prog_we = 1; prog_addr = UA_W'(c); prog_rd = p_rd[c]; prog_wr = p_wr[c];
      @(negedge clk);
    end
    prog_we = 0;
    prog_len = (UA_W + 1)'(p_len);
    for (int k = 0; k < 4; k++) begin
      for (int i = 0; i < 10; i++) begin
        host_we = 1; host_rf = BSEL_W'(h_rf[i]); host_addr = RF_AW'(h_ad[i]); host_wdata = hd[k][i];
        @(negedge clk);
      end
      host_we = 0;
      busy_cnt = 0; ov_t = -1;
      start = 1;
      @(negedge clk);
      start = 0;
      repeat (14) @(negedge clk);
      checks += 3;
      if (busy_cnt != 10) begin failures++; $display("FAIL pattern %0d busy %0d cycles", k, busy_cnt); end
      if (ov_t != 10 || ov_d != e_z[k]) begin
        failures++;
        $display("FAIL pattern %0d: z=%h at cycle %0d, expected %h at 10", k, ov_d, ov_t, e_z[k]);
      end
      host_rf = 0; host_addr = 4; #1;
      if (host_rdata != e_z[k]) begin failures++; $display("FAIL pattern %0d: stored z %h", k, host_rdata); end
      host_rf = 0; host_addr = 3; #1;
      checks++;
      if (host_rdata != e_t1[k]) begin failures++; $display("FAIL pattern %0d: t1 %h", k, host_rdata); end
      host_rf = 1; host_addr = 3; #1;
      checks++;
      if (host_rdata != e_t2[k]) begin failures++; $display("FAIL pattern %0d: t2 %h", k, host_rdata); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
