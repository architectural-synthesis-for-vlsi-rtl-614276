// tb_nn_workloads: runs fully connected feed-forward networks of the sizes
// used to evaluate the architecture on one processor at its default size:
// 6-21-12-1 (robot arm), 40-10-1 (ECG), 16-5-9-4 (pattern recognition),
// 64-8-1 (CP) and 12-12-12.
//
// A simple list scheduler builds each schedule: neurons of a layer are taken in
// pairs, one per MAC. Both MACs read the same input from bus 0 (broadcast) and
// their own weights from busses 1 and 2, closing the sum with MA_OUT; the two
// sums are stored in registers on busses 1 and 2, then passed through CLIP
// (a +-1.0 linear-threshold activation) back into register file 0, where the
// next layer reads them. Output neurons also leave through output unit 1.
// Weights and inputs are random; an integer reference model gives every
// neuron value, the output order and the run length.
`timescale 1ns/1ps
module tb_nn_workloads;
  import nnp_pkg::*;
  import tb_asm_pkg::*;

  localparam int NNET = 5, MAXL = 4, MAXN = 64, TMP = 500;

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
  int nl [NNET];
  int sz [NNET][MAXL];
  int base [MAXL];                     // RF0 address of each layer's values
  word_t val [MAXL][MAXN];             // reference neuron values
  int n_out, got_out, busy_cnt, m_bcast;
  word_t exp_out [MAXN];

  function automatic word_t r_sat(longint v);
    if (v > 32767) return 16'sh7fff;
    if (v < -32768) return 16'sh8000;
    return word_t'(v);
  endfunction

  // weight address of input i of neuron j in layer l: each MAC's weights are
  // packed in its own register file (MAC 0: bus 1, MAC 1: bus 2) from 1 up
  int waddr [MAXL][MAXN];              // first weight of neuron j

  always @(posedge clk) begin
    if (busy) busy_cnt++;
    if (out_valid[1]) begin
      checks++;
      if (got_out >= n_out || out_data[1] != exp_out[got_out]) begin
        failures++;
        if (failures < 10) $display("FAIL output %0d: %h", got_out, out_data[1]);
      end
      got_out++;
    end
  end

  initial begin : run
    nl = '{3, 4, 3, 4, 3};
    sz = '{'{40, 10, 1, 0}, '{6, 21, 12, 1}, '{64, 8, 1, 0}, '{16, 5, 9, 4}, '{12, 12, 12, 0}};
    for (int i = 0; i < NIN; i++) in_data[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    m_bcast = 0;
    for (int n = 0; n < NNET; n++) begin
      int c, w1, w2, len;
      word_t lim;
      lim = q88(1.0);
      // ---- data and reference ----
      base[0] = 1;
      for (int l = 1; l < nl[n]; l++) base[l] = base[l-1] + sz[n][l-1];
      w1 = 1; w2 = 1;
      host_we = 1;
      host_rf = 1; host_addr = 0; host_wdata = lim; @(negedge clk);
      host_rf = 2; host_addr = 0; host_wdata = lim; @(negedge clk);
      for (int i = 0; i < sz[n][0]; i++) begin
        val[0][i] = word_t'(int'($urandom % 512) - 256);      // -1.0 .. 1.0
        host_rf = 0; host_addr = RF_AW'(base[0] + i); host_wdata = val[0][i];
        @(negedge clk);
      end
      n_out = 0;
      for (int l = 1; l < nl[n]; l++)
        for (int j = 0; j < sz[n][l]; j++) begin
          longint acc;
          int rf;
          rf = (j % 2 == 0) ? 1 : 2;
          waddr[l][j] = (rf == 1) ? w1 : w2;
          acc = 0;
          for (int i = 0; i < sz[n][l-1]; i++) begin
            word_t w;
            w = word_t'(int'($urandom % 129) - 64);            // -0.5 .. 0.5 in Q2.7
            acc += longint'($signed(val[l-1][i])) * longint'($signed(w[CW-1:0]));
            host_rf = BSEL_W'(rf); host_addr = RF_AW'(waddr[l][j] + i); host_wdata = w;
            @(negedge clk);
          end
          if (rf == 1) w1 += sz[n][l-1]; else w2 += sz[n][l-1];
          val[l][j] = r_sat(acc >>> CFRAC);
          if ($signed(val[l][j]) > $signed(lim)) val[l][j] = lim;
          if ($signed(val[l][j]) < -$signed(lim)) val[l][j] = -lim;
          if (l == nl[n] - 1) begin exp_out[n_out] = val[l][j]; n_out++; end
        end
      host_we = 0;
      // ---- schedule ----
      clear();
      c = 0;
      for (int l = 1; l < nl[n]; l++)
        for (int j = 0; j < sz[n][l]; j += 2) begin
          bit pair;
          int k;
          pair = (j + 1 < sz[n][l]);
          k = sz[n][l-1];
          for (int i = 0; i < k; i++) begin
            fu(c + i, 0, (i == k - 1) ? OP_MA_OUT : OP_MA_ACC, 0, 0, base[l-1] + i, 1, waddr[l][j] + i);
            if (pair) begin
              fu(c + i, 1, (i == k - 1) ? OP_MA_OUT : OP_MA_ACC, 0, 0, base[l-1] + i, 2, waddr[l][j+1] + i);
              m_bcast++;
            end
          end
          c += k + 1;                                  // last MA_OUT result arrives here
          wb(c, 1, src_fu(0), 1, TMP);
          if (pair) wb(c, 2, src_fu(1), 1, TMP);
          fu(c + 1, 0, OP_CLIP, 0, 1, TMP, 2, 0);
          wb(c + 1, 0, src_fu(0), 1, base[l] + j);
          if (l == nl[n] - 1) outp(c + 1, 1, 0);
          if (pair) begin
            fu(c + 2, 1, OP_CLIP, 0, 2, TMP, 1, 0);
            wb(c + 2, 0, src_fu(1), 1, base[l] + j + 1);
            if (l == nl[n] - 1) outp(c + 2, 1, 0);
          end
          c += pair ? 3 : 2;
        end
      len = prg_len;
      checks++;
      if (asm_errors != 0 || len > MAXC) begin
        failures++;
        $display("FAIL net %0d: schedule has %0d conflicts, %0d cycles", n, asm_errors, len);
      end
      for (int i = 0; i < len; i++) begin
        prog_we = 1; prog_addr = UA_W'(i); prog_rd = prg_rd[i]; prog_wr = prg_wr[i];
        @(negedge clk);
      end
      prog_we = 0;
      prog_len = (UA_W + 1)'(len);
      got_out = 0; busy_cnt = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      repeat (len + 4) @(negedge clk);
      checks += 2;
      if (busy_cnt != len) begin failures++; $display("FAIL net %0d: busy %0d of %0d", n, busy_cnt, len); end
      if (got_out != n_out) begin failures++; $display("FAIL net %0d: %0d outputs of %0d", n, got_out, n_out); end
      // every hidden and output neuron value in register file 0
      for (int l = 1; l < nl[n]; l++)
        for (int j = 0; j < sz[n][l]; j++) begin
          host_rf = 0; host_addr = RF_AW'(base[l] + j); #1;
          checks++;
          if (host_rdata != val[l][j]) begin
            failures++;
            if (failures < 10) $display("FAIL net %0d layer %0d neuron %0d: %h, expected %h",
                                        n, l, j, host_rdata, val[l][j]);
          end
        end
      $display("net %0d: %0d layers, %0d cycles", n, nl[n], len);
      @(negedge clk);
    end
    checks++;
    if (m_bcast == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin #2000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
