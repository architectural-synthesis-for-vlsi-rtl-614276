// in_port: input unit, the receiving end of a systolic link or an external
// input.
//
// In the read phase of a cycle whose microcode sets cap, the unit latches the
// value on ext_data; in the write phase of the same cycle it drives that value
// onto whichever bus the write-phase word selects, so it reaches a register
// file in the cycle it arrives. The latched value stays on dout until the next
// capture, so the same input can also be written again later.
//
// Interface: cap and ext_data are sampled in cycle t; dout is ext_data during
// a capture cycle and the held value otherwise. Capture-and-write-in-one-cycle
// follows the document; holding the value is this design's choice.
module in_port
  import nnp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cap,
  input  word_t ext_data,
  output word_t dout
);
  word_t held_q;

  assign dout = cap ? ext_data : held_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   held_q <= '0;
    else if (cap) held_q <= ext_data;
  end

endmodule
