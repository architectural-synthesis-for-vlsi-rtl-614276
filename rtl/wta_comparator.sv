// wta_comparator: winner-take-all comparator functional unit.
//
// A competitive layer only needs to know which neuron won, because the output
// layer then just copies that neuron's block of outgoing weights. The weights
// are stored in blocks of n words (block k at offset + k*n), so the comparator
// turns the search into an address: it keeps the largest value seen so far in
// its local register and, next to it, the block offset k*n of its owner. That
// offset goes to the register files' address decoding, where a read marked as
// indexed adds it to the microcode address.
//
// Operations (one cycle each, result in the issue cycle):
//   CMP_FIRST  local register = in1 (candidate 0), stride n = in2,
//              candidate offset = 0, winner offset = 0
//   CMP_NEXT   candidate offset += n; if in1 > local register the register
//              takes in1 and the winner offset takes the candidate offset
// dout is the winning value after the operation (the "Winner" output), valid
// in the issue cycle; win_addr is the registered winner offset, so a read in
// the cycle after the last CMP_NEXT already uses it. Ties keep the earlier
// candidate. Other operation codes are ignored.
//
// The blocks (index, adder with constant, comparator, local register) and the
// stored-in-comparison-order weight layout follow the document; the stride
// loaded by CMP_FIRST and the tie rule are this design's choices.
module wta_comparator
  import nnp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  fu_op_e           op,
  input  word_t            in1,
  input  word_t            in2,
  output word_t            dout,
  output logic             dvalid,
  output logic [RF_AW-1:0] win_addr
);
  word_t            best_q;
  logic [RF_AW-1:0] stride_q, cand_q, win_q;

  logic [RF_AW-1:0] cand_next;    // "adder with constant"
  logic             take;

  assign cand_next = cand_q + stride_q;
  assign take      = (op == OP_CMP_NEXT) && (in1 > best_q);

  always_comb begin
    dvalid = (op == OP_CMP_FIRST) || (op == OP_CMP_NEXT);
    if (op == OP_CMP_FIRST || take) dout = in1;
    else                            dout = best_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_q   <= '0;
      stride_q <= '0;
      cand_q   <= '0;
      win_q    <= '0;
    end else if (op == OP_CMP_FIRST) begin
      best_q   <= in1;
      stride_q <= in2[RF_AW-1:0];
      cand_q   <= '0;
      win_q    <= '0;
    end else if (op == OP_CMP_NEXT) begin
      cand_q <= cand_next;
      if (take) begin
        best_q <= in1;
        win_q  <= cand_next;
      end
    end
  end

  assign win_addr = win_q;

endmodule
