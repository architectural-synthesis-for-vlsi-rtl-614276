// cla_adder: W-bit binary carry-lookahead adder built as a parallel-prefix
// tree.
//
// Each bit produces a (generate, propagate) pair; pairs are merged with the
// associative operator (g, p) o (g', p') = (g | p & g', p & p') in a
// Kogge-Stone tree of ceil(log2 W) levels, which gives every carry in
// logarithmic depth. The sum bits are p_i ^ c_i.
//
// Interface: purely combinational. sum = a + b + cin (mod 2^W), cout is the
// carry out of the top bit, ovf flags two's-complement overflow (the carries
// into and out of the sign bit differ).
//
// The 25-bit width and the binary-tree carry computation follow the PE chip's
// adder; the Kogge-Stone shape is this design's choice.
module cla_adder #(
  parameter int unsigned W = 25
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         ovf
);
  localparam int unsigned LV = $clog2(W);

  // g/p of the span ending at bit i after each level; position 0 folds in cin
  logic [W-1:0] g [LV+1];
  logic [W-1:0] p [LV+1];
  logic [W-1:0] c;          // carry into each bit

  always_comb begin
    g[0] = a & b;
    p[0] = a ^ b;
    g[0][0] = (a[0] & b[0]) | ((a[0] ^ b[0]) & cin);
    // level l merges each span with the one 2^l bits below it; the low 2^l
    // positions have nothing below and keep their pair
    for (int unsigned l = 0; l < LV; l++) begin
      g[l+1] = g[l] | (p[l] & (g[l] << (1 << l)));
      p[l+1] = p[l] & ((p[l] << (1 << l)) | W'((1 << (1 << l)) - 1));
    end
    c    = {g[LV][W-2:0], cin};
    sum  = p[0] ^ c;
    cout = g[LV][W-1];
    ovf  = cout ^ c[W-1];
  end

endmodule
