// out_port: output unit, the sending end of a systolic link or an external
// output.
//
// In the write phase of a cycle whose microcode sets en, the unit takes the
// value on its selected write bus (usually a result an FU drives that cycle);
// from the next cycle, the read phase, it presents the value outside with a
// one-cycle valid strobe. The value stays on ext_data until the next capture.
//
// Interface: en and din in cycle t; ext_data/ext_valid in cycle t+1. Capture
// on the write phase and output on the read phase follow the document; the
// valid strobe is this design's choice.
module out_port
  import nnp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  word_t din,
  output word_t ext_data,
  output logic  ext_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ext_data  <= '0;
      ext_valid <= 1'b0;
    end else begin
      ext_valid <= en;
      if (en) ext_data <= din;
    end
  end

endmodule
