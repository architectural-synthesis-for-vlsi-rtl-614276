// tb_nn_systolic_array: end-to-end test of the circular array at its default
// size (no parameter overrides).
//
// Three runs of broadcast microcode on every PE:
//   1, 2  the XOR network (2 inputs, 2 hidden threshold neurons, 1 output),
//         one input pattern per PE per run, so all four patterns are covered;
//         checks the outputs, the 10-cycle schedule length and the output time.
//   3     a mixed schedule: each PE sends its input around the ring and takes
//         an external input, computes two neurons with interleaved local
//         registers, picks the larger with the comparator, reads a weight block
//         through indexed addressing, and applies ADD / MULT / CLIP / HLIM.
// Expected values come from an independent integer model. Each mechanism is
// counted and one that never happened is a failure.
`timescale 1ns/1ps
module tb_nn_systolic_array;
  import nnp_pkg::*;
  import tb_asm_pkg::*;

  localparam int NPE  = 2;     // default of the top
  localparam int MAXH = 128;   // host writes per run
  localparam int MAXE = 16;    // output events per PE per run

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  logic prog_we = 0;
  logic [UA_W-1:0] prog_addr = '0;
  rd_word_t prog_rd = '0;
  wr_word_t prog_wr = '0;
  logic [UA_W:0] prog_len = '0;
  logic [0:0] host_pe = '0;
  logic host_we = 0;
  logic [BSEL_W-1:0] host_rf = '0;
  logic [RF_AW-1:0] host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  word_t ext_in [NPE];
  word_t ext_out [NPE];
  logic  ext_out_valid [NPE];

  nn_systolic_array dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- planned runs ----------------
  localparam int NRUN = 3;
  rd_word_t r_rd [NRUN][MAXC];
  wr_word_t r_wr [NRUN][MAXC];
  int       r_len [NRUN];
  int       h_n [NRUN];
  int       h_pe [NRUN][MAXH], h_rf [NRUN][MAXH], h_addr [NRUN][MAXH];
  word_t    h_data [NRUN][MAXH];
  word_t    r_ext [NRUN][NPE];
  int       e_n [NRUN][NPE];                 // expected output events
  int       e_t [NRUN][NPE][MAXE];
  word_t    e_d [NRUN][NPE][MAXE];
  // register-file words to check after a run: pe, rf, addr, value
  int       k_n [NRUN];
  int       k_pe [NRUN][8], k_rf [NRUN][8], k_addr [NRUN][8];
  word_t    k_d [NRUN][8];

  // mechanism counters
  int m_xor = 0, m_broadcast = 0, m_thresh = 0, m_interleave = 0, m_ring = 0, m_extin = 0;
  int m_cmp_win = 0, m_indexed = 0, m_clip_lim = 0, m_hlim = 0, m_mult = 0, m_simd = 0;
  bit pe_win [NPE];
  bit pe_lim [NPE];

  // ---------------- reference arithmetic ----------------
  function automatic longint cval(word_t w);    // Q2.7 coefficient in the low bits
    return longint'($signed(w[CW-1:0]));
  endfunction
  function automatic word_t r_sat(longint v);
    if (v > 32767) return 16'sh7fff;
    if (v < -32768) return 16'sh8000;
    return word_t'(v);
  endfunction
  function automatic word_t r_ma2(word_t x1, word_t w1, word_t x2, word_t w2);
    return r_sat((longint'($signed(x1)) * cval(w1) + longint'($signed(x2)) * cval(w2)) >>> CFRAC);
  endfunction
  function automatic word_t r_thr(word_t x, word_t c);
    return ($signed(x) > $signed(c)) ? word_t'(ONE) : '0;
  endfunction
  function automatic word_t r_clip(word_t x, word_t l);
    longint lim = $signed(l) < 0 ? -longint'($signed(l)) : longint'($signed(l));
    if (longint'($signed(x)) > lim) return word_t'(lim);
    if (longint'($signed(x)) < -lim) return word_t'(-lim);
    return x;
  endfunction

  function automatic void hw(int r, int pe, int rf, int addr, word_t d);
    h_pe[r][h_n[r]] = pe; h_rf[r][h_n[r]] = rf; h_addr[r][h_n[r]] = addr; h_data[r][h_n[r]] = d;
    h_n[r]++;
  endfunction
  function automatic void ev(int r, int pe, int t, word_t d);
    e_t[r][pe][e_n[r][pe]] = t; e_d[r][pe][e_n[r][pe]] = d;
    e_n[r][pe]++;
  endfunction
  function automatic void kw(int r, int pe, int rf, int addr, word_t d);
    k_pe[r][k_n[r]] = pe; k_rf[r][k_n[r]] = rf; k_addr[r][k_n[r]] = addr; k_d[r][k_n[r]] = d;
    k_n[r]++;
  endfunction
  function automatic void save(int r);
    for (int c = 0; c < MAXC; c++) begin
      r_rd[r][c] = prg_rd[c];
      r_wr[r][c] = prg_wr[c];
    end
    r_len[r] = prg_len;
  endfunction

  // XOR schedule (10 cycles). RF0: x1 x2 c t1 z; RF1: w11 w21 xt1 t2;
  // RF2: w12 w22 v1 v2 xt2 zt.
  function automatic void plan_xor();
    clear();
    fu(0, 0, OP_MA_ACC, 0, 0, 0, 1, 0);
    fu(0, 1, OP_MA_ACC, 0, 0, 0, 2, 0);      // x1 broadcast to both MACs
    fu(1, 0, OP_MA_OUT, 0, 0, 1, 1, 1);
    fu(1, 1, OP_MA_OUT, 0, 0, 1, 2, 1);
    wb(3, 1, src_fu(0), 1, 2);
    wb(3, 2, src_fu(1), 1, 4);
    fu(4, 0, OP_THRESH, 0, 1, 2, 0, 2);
    fu(4, 1, OP_THRESH, 0, 2, 4, 0, 2);      // threshold c broadcast
    wb(4, 0, src_fu(0), 1, 3);
    wb(4, 1, src_fu(1), 1, 3);
    fu(5, 0, OP_MA_ACC, 0, 0, 3, 2, 2);
    fu(6, 0, OP_MA_OUT, 0, 1, 3, 2, 3);
    wb(8, 2, src_fu(0), 1, 5);
    fu(9, 0, OP_THRESH, 0, 2, 5, 0, 2);
    wb(9, 0, src_fu(0), 1, 4);
    outp(9, 1, 0);
  endfunction

  // mixed schedule (18 cycles).
  // RF0: x_own n0 - a m; RF1: lim x_other n1 sigma;
  // RF2: e wa wc wb wd stride mu alpha blk[0..3] at 8..11
  function automatic void plan_mixed();
    clear();
    fu(0, 1, OP_CLIP, 0, 0, 0, 1, 0);        // pass x_own to the ring
    wb(0, 0, src_fu(1), 0, 0);
    outp(0, 0, 0);
    incap(0, 1);                             // external input
    wb(0, 2, src_in(1), 1, 0);
    incap(2, 0);                             // neighbour's x, LINK_DELAY+1 later
    wb(2, 1, src_in(0), 1, 1);
    fu(3, 0, OP_MA_ACC, 0, 0, 0, 2, 1);
    fu(4, 0, OP_MA_ACC, 1, 0, 0, 2, 2);
    fu(5, 0, OP_MA_OUT, 0, 1, 1, 2, 3);
    fu(6, 0, OP_MA_OUT, 1, 1, 1, 2, 4);
    wb(7, 0, src_fu(0), 1, 1);
    outp(7, 1, 0);
    wb(8, 1, src_fu(0), 1, 2);
    outp(8, 1, 1);
    fu(9, 2, OP_CMP_FIRST, 0, 0, 1, 2, 5);
    fu(10, 2, OP_CMP_NEXT, 0, 1, 2, 1, 2);
    fu(11, 1, OP_CLIP, 0, 2, 8, 1, 0, 1, 0); // indexed block read
    wb(11, 2, src_fu(1), 0, 0);
    outp(11, 1, 2);
    fu(12, 1, OP_CLIP, 0, 2, 9, 1, 0, 1, 0);
    wb(12, 2, src_fu(1), 0, 0);
    outp(12, 1, 2);
    fu(13, 1, OP_ADD, 0, 0, 1, 1, 3);
    wb(13, 0, src_fu(1), 1, 3);
    fu(14, 1, OP_MULT, 0, 0, 3, 2, 6);
    wb(15, 0, src_fu(1), 1, 4);
    fu(16, 1, OP_CLIP, 0, 0, 4, 2, 7);
    wb(16, 2, src_fu(1), 0, 0);
    outp(16, 1, 2);
    fu(17, 1, OP_HLIM, 0, 0, 1, 2, 7);
    wb(17, 1, src_fu(1), 0, 0);
    outp(17, 1, 1);
  endfunction

  // plan everything in zero time
  initial begin : plan
    real xin [4][2];
    word_t w11, w21, w12, w22, v1, v2;
    word_t x [NPE];
    word_t wa, wb_, wc, wd, sig, mu, alpha, lim;
    xin = '{'{1.0, 0.0}, '{0.0, 1.0}, '{1.0, 1.0}, '{0.0, 0.0}};
    w11 = coef(-0.7); w21 = coef(0.5); w12 = coef(0.3); w22 = coef(-0.8);
    v1 = coef(0.4); v2 = coef(0.6);
    for (int r = 0; r < NRUN; r++) begin
      h_n[r] = 0; k_n[r] = 0;
      for (int p = 0; p < NPE; p++) begin
        e_n[r][p] = 0;
        r_ext[r][p] = '0;
      end
    end

    plan_xor();
    if (prg_len != 10) begin
      $display("FAIL: XOR schedule length %0d", prg_len);
      failures++;
    end
    checks++;
    save(0);
    save(1);
    for (int r = 0; r < 2; r++)
      for (int p = 0; p < NPE; p++) begin : xor_pe
        word_t x1, x2, t1, t2, z;
        x1 = q88(xin[2*r+p][0]); x2 = q88(xin[2*r+p][1]);
        hw(r, p, 0, 0, x1); hw(r, p, 0, 1, x2); hw(r, p, 0, 2, '0);
        hw(r, p, 1, 0, w11); hw(r, p, 1, 1, w21);
        hw(r, p, 2, 0, w12); hw(r, p, 2, 1, w22); hw(r, p, 2, 2, v1); hw(r, p, 2, 3, v2);
        t1 = r_thr(r_ma2(x1, w11, x2, w21), '0);
        t2 = r_thr(r_ma2(x1, w12, x2, w22), '0);
        z  = r_thr(r_ma2(t1, v1, t2, v2), '0);
        if (z != ((xin[2*r+p][0] != xin[2*r+p][1]) ? word_t'(ONE) : '0)) begin
          $display("FAIL: reference XOR weights wrong for pattern %0d", 2*r+p);
          failures++;
        end
        checks++;
        ev(r, p, 10, z);
        kw(r, p, 0, 3, t1);
        kw(r, p, 1, 3, t2);
      end

    plan_mixed();
    save(2);
    x[0] = q88(1.0); x[1] = q88(-0.5);
    wa = coef(0.5); wb_ = coef(0.25); wc = coef(-0.5); wd = coef(1.0);
    sig = q88(0.5); mu = coef(1.5); alpha = q88(1.0); lim = q88(100.0);
    for (int p = 0; p < NPE; p++) begin : mixed_pe
      word_t xo, n0, n1, a, m, y;
      int win;
      xo = x[(p + NPE - 1) % NPE];
      r_ext[2][p] = q88(3.0 + p);
      hw(2, p, 0, 0, x[p]);
      hw(2, p, 1, 0, lim); hw(2, p, 1, 3, sig);
      hw(2, p, 2, 1, wa); hw(2, p, 2, 2, wc); hw(2, p, 2, 3, wb_); hw(2, p, 2, 4, wd);
      hw(2, p, 2, 5, word_t'(2)); hw(2, p, 2, 6, mu); hw(2, p, 2, 7, alpha);
      for (int k = 0; k < 4; k++) hw(2, p, 2, 8 + k, q88(10.0 * p + k + 1));
      n0 = r_ma2(x[p], wa, xo, wb_);
      n1 = r_ma2(x[p], wc, xo, wd);
      win = ($signed(n1) > $signed(n0)) ? 2 : 0;
      pe_win[p] = (win != 0);
      a = r_sat(longint'($signed(n0)) + longint'($signed(sig)));
      m = r_sat((longint'($signed(a)) * cval(mu)) >>> CFRAC);
      y = r_clip(m, alpha);
      pe_lim[p] = (y != m);
      ev(2, p, 8, n0);
      ev(2, p, 9, n1);
      ev(2, p, 12, q88(10.0 * p + win + 1));
      ev(2, p, 13, q88(10.0 * p + win + 2));
      ev(2, p, 17, y);
      ev(2, p, 18, ($signed(n0) > 0) ? alpha : -alpha);
      kw(2, p, 1, 1, xo);
      kw(2, p, 2, 0, r_ext[2][p]);
      kw(2, p, 0, 3, a);
    end
    if (asm_errors != 0) begin
      $display("FAIL: %0d schedule conflicts", asm_errors);
      failures++;
    end
    checks++;
  end

  // ---------------- output monitor ----------------
  int tcnt = 0;
  int busy_cnt = 0;
  int g_n [NPE];
  int g_t [NPE][MAXE];
  word_t g_d [NPE][MAXE];
  initial for (int p = 0; p < NPE; p++) g_n[p] = 0;

  always @(posedge clk) begin
    if (busy) busy_cnt++;
    for (int p = 0; p < NPE; p++)
      if (ext_out_valid[p] && g_n[p] < MAXE) begin
        g_t[p][g_n[p]] = tcnt;
        g_d[p][g_n[p]] = ext_out[p];
        g_n[p]++;
      end
    tcnt = start ? 0 : tcnt + 1;
  end

  // ---------------- driver ----------------
  initial begin : drive
    for (int p = 0; p < NPE; p++) ext_in[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < NRUN; r++) begin
      @(negedge clk);
      for (int i = 0; i < h_n[r]; i++) begin
        host_we = 1; host_pe = h_pe[r][i][0:0]; host_rf = BSEL_W'(h_rf[r][i]);
        host_addr = RF_AW'(h_addr[r][i]); host_wdata = h_data[r][i];
        @(negedge clk);
      end
      host_we = 0;
      for (int c = 0; c < r_len[r]; c++) begin
        prog_we = 1; prog_addr = UA_W'(c); prog_rd = r_rd[r][c]; prog_wr = r_wr[r][c];
        @(negedge clk);
      end
      prog_we = 0;
      prog_len = (UA_W + 1)'(r_len[r]);
      for (int p = 0; p < NPE; p++) ext_in[p] = r_ext[r][p];
      for (int p = 0; p < NPE; p++) g_n[p] = 0;
      busy_cnt = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      repeat (r_len[r] + 6) @(negedge clk);

      // schedule length
      checks++;
      if (busy_cnt != r_len[r]) begin
        $display("FAIL run %0d: busy for %0d cycles, expected %0d", r, busy_cnt, r_len[r]);
        failures++;
      end
      // output events
      for (int p = 0; p < NPE; p++) begin
        checks++;
        if (g_n[p] != e_n[r][p]) begin
          $display("FAIL run %0d PE %0d: %0d outputs, expected %0d", r, p, g_n[p], e_n[r][p]);
          failures++;
        end
        for (int i = 0; i < e_n[r][p] && i < g_n[p]; i++) begin
          checks++;
          if (g_t[p][i] != e_t[r][p][i] || g_d[p][i] != e_d[r][p][i]) begin
            $display("FAIL run %0d PE %0d out %0d: got %h at cycle %0d, expected %h at cycle %0d",
                     r, p, i, g_d[p][i], g_t[p][i], e_d[r][p][i], e_t[r][p][i]);
            failures++;
          end else begin
            if (r < 2) begin
              m_xor++;
              m_broadcast++;
              if (e_d[r][p][i] == word_t'(ONE)) m_thresh++;
            end else begin
              if (i == 0 || i == 1) m_interleave++;
              if ((i == 2 || i == 3) && pe_win[p]) begin
                m_indexed++;
                if (i == 2) m_cmp_win++;
              end
              if (i == 4) begin
                m_mult++;
                if (pe_lim[p]) m_clip_lim++;
              end
              if (i == 5) m_hlim++;
            end
          end
        end
      end
      if (g_n[0] == e_n[r][0] && g_n[1] == e_n[r][1] && g_t[0][0] == g_t[1][0]) m_simd++;
      // register-file contents
      for (int i = 0; i < k_n[r]; i++) begin
        host_pe = k_pe[r][i][0:0]; host_rf = BSEL_W'(k_rf[r][i]); host_addr = RF_AW'(k_addr[r][i]);
        #1;
        checks++;
        if (host_rdata != k_d[r][i]) begin
          $display("FAIL run %0d PE %0d RF%0d[%0d] = %h, expected %h", r, k_pe[r][i], k_rf[r][i],
                   k_addr[r][i], host_rdata, k_d[r][i]);
          failures++;
        end else if (r == 2 && k_rf[r][i] == 1) m_ring++;
        else if (r == 2 && k_rf[r][i] == 2) m_extin++;
      end
    end

    $display("mechanisms: xor=%0d broadcast=%0d thresh=%0d interleave=%0d ring=%0d extin=%0d",
             m_xor, m_broadcast, m_thresh, m_interleave, m_ring, m_extin);
    $display("mechanisms: cmp_win=%0d indexed=%0d mult=%0d clip_lim=%0d hlim=%0d simd=%0d",
             m_cmp_win, m_indexed, m_mult, m_clip_lim, m_hlim, m_simd);
    if (m_xor == 0)        begin failures++; $display("FAIL: XOR never computed"); end
    if (m_broadcast == 0)  begin failures++; $display("FAIL: no broadcast read"); end
    if (m_thresh == 0)     begin failures++; $display("FAIL: no threshold neuron fired"); end
    if (m_interleave == 0) begin failures++; $display("FAIL: no interleaved local registers"); end
    if (m_ring == 0)       begin failures++; $display("FAIL: no systolic transfer"); end
    if (m_extin == 0)      begin failures++; $display("FAIL: no external input"); end
    if (m_cmp_win == 0)    begin failures++; $display("FAIL: comparator never changed winner"); end
    if (m_indexed == 0)    begin failures++; $display("FAIL: no indexed read"); end
    if (m_mult == 0)       begin failures++; $display("FAIL: no MULT"); end
    if (m_clip_lim == 0)   begin failures++; $display("FAIL: CLIP never limited"); end
    if (m_hlim == 0)       begin failures++; $display("FAIL: no HLIM"); end
    if (m_simd == 0)       begin failures++; $display("FAIL: PEs not in lock step"); end
    checks += 12;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #200000;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
