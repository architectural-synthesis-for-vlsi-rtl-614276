// tb_mac_unit: drives the multi-purpose MAC with a scripted stream of
// operations and checks every cycle's output driver against a reference model
// written with plain integer arithmetic: the value and the cycle it appears in
// (1 cycle for ADD/SUB/THRESH/HLIM/CLIP, 2 for MULT, 3 for a MA), MAs
// interleaved over both local registers, accumulator preload, the threshold
// rule at equality and saturation.
module tb_mac_unit;
  import nnp_pkg::*;
  import tb_asm_pkg::q88, tb_asm_pkg::coef;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fu_op_e op;
  logic [LR_W-1:0] lr;
  word_t in1, in2, dout;
  logic dvalid;
  int checks = 0, failures = 0;

  mac_unit dut (.clk, .rst_n, .op, .lr, .in1, .in2, .dout, .dvalid);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  localparam int NCYC = 1200;
  bit    exp_v [NCYC];
  word_t exp_d [NCYC];
  longint racc [NLR];

  function automatic word_t ref_sat(longint v);
    if (v > 32767) return 16'sh7fff;
    if (v < -32768) return 16'sh8000;
    return word_t'(v);
  endfunction
  function automatic longint ref_acc_sat(longint v);
    if (v > (1 <<< 24) - 1) return (1 <<< 24) - 1;
    if (v < -(1 <<< 24)) return -(1 <<< 24);
    return v;
  endfunction
  function automatic longint cf(word_t w);   // Q2.7 coefficient of a word
    return longint'($signed(w[8:0]));
  endfunction

  // the planned stream: one entry per cycle, expectations filled in as planned
  fu_op_e      pl_op [NCYC];
  int          pl_lr [NCYC];
  word_t       pl_a  [NCYC];
  word_t       pl_b  [NCYC];
  int          npl = 0;
  int cyc = 0;
  function automatic void issue(fu_op_e o, int l, word_t a, word_t b);
    pl_op[npl] = o; pl_lr[npl] = l; pl_a[npl] = a; pl_b[npl] = b;
    npl++;
  endfunction

  // expected results of the entry planned for cycle cyc
  function automatic void model(fu_op_e o, int l, word_t a, word_t b);
    longint p, s, lim;
    p = longint'(a) * cf(b);
    case (o)
      OP_ADD:    begin exp_v[cyc] = 1; exp_d[cyc] = ref_sat(longint'(a) + longint'(b)); end
      OP_SUB:    begin exp_v[cyc] = 1; exp_d[cyc] = ref_sat(longint'(a) - longint'(b)); end
      OP_THRESH: begin exp_v[cyc] = 1; exp_d[cyc] = (a > b) ? 16'sd256 : 16'sd0; end
      OP_HLIM:   begin exp_v[cyc] = 1; exp_d[cyc] = (a > 0) ? b : -b; end
      OP_CLIP: begin
        lim = (b < 0) ? -longint'(b) : longint'(b);
        exp_v[cyc] = 1;
        exp_d[cyc] = (longint'(a) > lim) ? word_t'(lim) : (longint'(a) < -lim) ? word_t'(-lim) : a;
      end
      OP_MULT:   begin exp_v[cyc+1] = 1; exp_d[cyc+1] = ref_sat(p >>> 7); end
      OP_MA_ACC: racc[l] = ref_acc_sat(racc[l] + p);
      OP_MA_OUT: begin
        s = ref_acc_sat(racc[l] + p);
        racc[l] = 0;
        exp_v[cyc+2] = 1; exp_d[cyc+2] = ref_sat(s >>> 7);
      end
      OP_ACC_LD: racc[l] = longint'(a) <<< 7;
      default: ;
    endcase
  endfunction

  always @(negedge clk) if (rst_n) begin
    #3;
    checks++;
    if (dvalid !== exp_v[cyc] || (exp_v[cyc] && dout !== exp_d[cyc])) begin
      failures++;
      $display("FAIL cycle %0d: dvalid=%b dout=%0d, expected %b %0d", cyc, dvalid, dout, exp_v[cyc], exp_d[cyc]);
    end
  end
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  function automatic void nop(int n);
    repeat (n) issue(OP_NOP, 0, 0, 0);
  endfunction

  int n_ma_interleaved = 0;
  initial begin
    for (int i = 0; i < NCYC; i++) begin exp_v[i] = 0; exp_d[i] = 0; end
    for (int i = 0; i < NLR; i++) racc[i] = 0;
    // one-cycle operations
    issue(OP_ADD, 0, q88(1.5), q88(2.25));
    issue(OP_SUB, 0, q88(1.5), q88(2.25));
    issue(OP_ADD, 0, 16'sh7f00, 16'sh1000);        // saturates
    issue(OP_THRESH, 0, q88(0.3), q88(0.0));
    issue(OP_THRESH, 0, q88(0.0), q88(0.0));        // equality gives 0
    issue(OP_THRESH, 0, q88(-0.5), q88(0.0));
    issue(OP_HLIM, 0, q88(0.7), q88(2.0));
    issue(OP_HLIM, 0, q88(-0.7), q88(2.0));
    issue(OP_CLIP, 0, q88(3.0), q88(2.0));
    issue(OP_CLIP, 0, q88(-3.0), q88(2.0));
    issue(OP_CLIP, 0, q88(1.25), q88(-2.0));
    nop(1);
    // multiplication: 2 cycles
    issue(OP_MULT, 0, q88(2.0), coef(0.5));
    nop(2);
    issue(OP_MULT, 0, 16'sh7fff, coef(1.9));        // saturates
    nop(2);
    // the XOR hidden neuron of the document: 1*(-0.7) + 0*0.5
    issue(OP_MA_ACC, 0, q88(1.0), coef(-0.7));
    issue(OP_MA_OUT, 0, q88(0.0), coef(0.5));
    nop(3);
    // two neurons interleaved on two local registers
    issue(OP_MA_ACC, 0, q88(1.0), coef(0.25));
    issue(OP_MA_ACC, 1, q88(2.0), coef(-0.5));
    issue(OP_MA_ACC, 0, q88(3.0), coef(0.75));
    issue(OP_MA_ACC, 1, q88(-1.5), coef(1.5));
    issue(OP_MA_OUT, 0, q88(0.5), coef(-1.0));
    issue(OP_MA_OUT, 1, q88(0.25), coef(0.125));
    n_ma_interleaved++;
    // a one-cycle op may complete alongside nothing else: leave the slot free
    nop(3);
    // accumulator preload then close the sum
    issue(OP_ACC_LD, 1, q88(1.0), 0);
    issue(OP_MA_OUT, 1, q88(1.0), coef(0.5));
    nop(3);
    // random MA sums of random lengths, alternating registers
    for (int t = 0; t < 150; t++) begin
      int n = 1 + ($urandom % 6);
      int l = t % NLR;
      for (int k = 0; k < n - 1; k++) issue(OP_MA_ACC, l, word_t'($urandom), word_t'($urandom));
      issue(OP_MA_OUT, l, word_t'($urandom), word_t'($urandom));
      nop(2);
    end
    // random one-cycle and multiply operations, spaced to avoid collisions
    for (int t = 0; t < 100; t++) begin
      fu_op_e o;
      case ($urandom % 6)
        0: o = OP_ADD; 1: o = OP_SUB; 2: o = OP_THRESH; 3: o = OP_HLIM; 4: o = OP_CLIP; default: o = OP_MULT;
      endcase
      issue(o, 0, word_t'($urandom), word_t'($urandom));
      nop(1);
    end
    nop(4);
    for (int i = 0; i < npl; i++) begin
      cyc = i;
      model(pl_op[i], pl_lr[i], pl_a[i], pl_b[i]);
    end
    cyc = 0;
  end

  // stimulus: drive the planned stream, one entry per cycle
  initial begin
    op = OP_NOP; lr = 0; in1 = 0; in2 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < npl; i++) begin
      op = pl_op[i]; lr = LR_W'(pl_lr[i]); in1 = pl_a[i]; in2 = pl_b[i];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
