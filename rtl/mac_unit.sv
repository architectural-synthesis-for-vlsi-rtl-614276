// mac_unit: multi-purpose pipelined multiply-accumulate functional unit with a
// threshold (truncator) stage and NLR local registers (accumulators).
//
// Datapath: a two-stage modified-Booth multiplier (booth_mult) feeds a product
// register; a 25-bit carry-lookahead adder (cla_adder) adds either the product
// and a local register (multiply-accumulate) or the two input latches (add,
// subtract); a threshold block compares the input latches. Operations and
// their latencies (cycles from the read phase that fills the latches to the
// write phase that drives the result on a bus, counting both):
//
//   ADD, SUB, THRESH, HLIM, CLIP ... 1   result in the issue cycle
//   MULT ........................... 2   in1 * coef(in2), scaled back to Q8.8
//   MA_ACC, MA_OUT ................. 3   lr += in1 * coef(in2); MA_OUT drives
//                                        lr + product and clears lr
//   ACC_LD ......................... -   lr = in1, written at the end of the cycle
//
// A multiply-accumulate is added into its local register in its third cycle,
// so back-to-back MAs on the same register need no gap. Interleaving MAs for
// two neurons on two local registers is what lets one MAC keep two sums open.
//
// Interface: op/lr/in1/in2 are the issue of cycle t. dout/dvalid carry the
// result that completes in the current cycle. Keeping two results from
// completing in one cycle, and ADD/SUB from meeting a MA's add stage on the
// shared adder, is the microcode's job; assertions report a violation.
//
// Number format: in1 and the results are Q8.8, the coefficient is the low 9
// bits of in2 (Q2.7), products and local registers are Q10.15. Accumulation
// and results saturate. The operation set, latencies and MULT_AC1 / MULT_AC2
// style of closing a sum follow the document; the format, saturation, HLIM /
// CLIP split and ACC_LD are this design's reading of it.
module mac_unit
  import nnp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  fu_op_e            op,
  input  logic [LR_W-1:0]   lr,
  input  word_t             in1,
  input  word_t             in2,
  output word_t             dout,
  output logic              dvalid
);
  // ---------------- multiplier (stages 1 and 2) ----------------
  acc_t prod;
  booth_mult #(.A_W(DW), .B_W(CW)) u_mult (
    .clk (clk),
    .a   (in1),
    .b   (in2[CW-1:0]),
    .p   (prod)
  );

  typedef struct packed {
    logic            v;
    fu_op_e          op;
    logic [LR_W-1:0] lr;
  } tag_t;

  tag_t s1_q, s2_q;       // op in multiplier stage 2, op in the add stage
  acc_t prod_q;           // product register in front of the adder
  acc_t acc_q [NLR];

  logic issue_mul;
  assign issue_mul = (op == OP_MULT) || (op == OP_MA_ACC) || (op == OP_MA_OUT);

  logic s1_ma, s2_ma;
  assign s1_ma = s1_q.v && (s1_q.op == OP_MA_ACC || s1_q.op == OP_MA_OUT);
  assign s2_ma = s2_q.v;  // only MAs enter the add stage

  // ---------------- shared adder ----------------
  acc_t add_a, add_b, add_sum, acc_sat;
  logic add_cin, add_cout, add_ovf;
  logic is_addsub;
  assign is_addsub = (op == OP_ADD) || (op == OP_SUB);

  always_comb begin
    if (s2_ma) begin
      add_a   = prod_q;
      add_b   = acc_q[s2_q.lr];
      add_cin = 1'b0;
    end else begin
      add_a   = acc_t'(in1);
      add_b   = (op == OP_SUB) ? ~acc_t'(in2) : acc_t'(in2);
      add_cin = (op == OP_SUB);
    end
  end

  cla_adder #(.W(PW)) u_add (
    .a    (add_a),
    .b    (add_b),
    .cin  (add_cin),
    .sum  (add_sum),
    .cout (add_cout),
    .ovf  (add_ovf)
  );

  // saturate the accumulation on two's-complement overflow
  always_comb begin
    if (add_ovf) acc_sat = add_a[PW-1] ? {1'b1, {(PW-1){1'b0}}} : {1'b0, {(PW-1){1'b1}}};
    else         acc_sat = add_sum;
  end

  // ---------------- threshold block ----------------
  word_t lim;             // |in2|, the truncation level
  word_t thr_out;
  assign lim = in2[DW-1] ? -in2 : in2;

  always_comb begin
    unique case (op)
      OP_THRESH: thr_out = (in1 > in2) ? ONE : '0;
      OP_HLIM:   thr_out = (in1 > 0) ? in2 : -in2;
      default:   thr_out = (in1 > lim) ? lim : ((in1 < -lim) ? -lim : in1); // CLIP
    endcase
  end

  // ---------------- result selection ----------------
  logic one_cycle;
  assign one_cycle = is_addsub || (op == OP_THRESH) || (op == OP_HLIM) || (op == OP_CLIP);

  always_comb begin
    dvalid = 1'b0;
    dout   = '0;
    if (s2_ma && s2_q.op == OP_MA_OUT) begin
      dvalid = 1'b1;
      dout   = sat_scale(acc_sat);
    end
    if (s1_q.v && s1_q.op == OP_MULT) begin
      dvalid = 1'b1;
      dout   = sat_scale(prod);
    end
    if (one_cycle) begin
      dvalid = 1'b1;
      dout   = is_addsub ? sat_word(add_sum) : thr_out;
    end
  end

  // ---------------- pipeline and local registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q   <= '0;
      s2_q   <= '0;
      prod_q <= '0;
      for (int i = 0; i < NLR; i++) acc_q[i] <= '0;
    end else begin
      s1_q   <= '{v: issue_mul, op: op, lr: lr};
      s2_q   <= '{v: s1_ma, op: s1_q.op, lr: s1_q.lr};
      prod_q <= prod;
      if (s2_ma)
        acc_q[s2_q.lr] <= (s2_q.op == OP_MA_OUT) ? '0 : acc_sat;
      if (op == OP_ACC_LD)
        acc_q[lr] <= acc_t'(in1) <<< CFRAC;
    end
  end

  // ---------------- scheduling rules ----------------
  property p_no_adder_clash;
    @(posedge clk) disable iff (!rst_n) !(s2_ma && is_addsub);
  endproperty
  a_no_adder_clash: assert property (p_no_adder_clash)
    else $error("mac_unit: ADD/SUB issued while a MA uses the adder");

  property p_one_result;
    @(posedge clk) disable iff (!rst_n)
      $onehot0({s2_ma && s2_q.op == OP_MA_OUT, s1_q.v && s1_q.op == OP_MULT, one_cycle});
  endproperty
  a_one_result: assert property (p_one_result)
    else $error("mac_unit: two results complete in one cycle");

  property p_lr_clash;
    @(posedge clk) disable iff (!rst_n) !(s2_ma && op == OP_ACC_LD && lr == s2_q.lr);
  endproperty
  a_lr_clash: assert property (p_lr_clash)
    else $error("mac_unit: ACC_LD and a MA write the same local register");

endmodule
