// oi_link: systolic interconnection between the output unit of one processor
// and the input unit of the next.
//
// The output-input (O/I) operation sends a value out of one processor and
// into its neighbour; the cycles in between are the interconnection delay,
// which the schedule accounts for so that the neighbour's input unit captures
// the value in the right cycle. The link is a DELAY-stage register pipeline
// for the value and its valid strobe (DELAY = 0 is a plain wire).
//
// Interface: din/din_valid in cycle t appear on dout/dout_valid in cycle
// t+DELAY. The output/delay/input structure follows the document; the delay of
// one stage is this design's choice.
module oi_link
  import nnp_pkg::*;
#(
  parameter int unsigned DELAY = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t din,
  input  logic  din_valid,
  output word_t dout,
  output logic  dout_valid
);
  if (DELAY == 0) begin : g_wire
    assign dout       = din;
    assign dout_valid = din_valid;
  end else begin : g_pipe
    word_t d_q [DELAY];
    logic  v_q [DELAY];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DELAY); i++) begin
          d_q[i] <= '0;
          v_q[i] <= 1'b0;
        end
      end else begin
        d_q[0] <= din;
        v_q[0] <= din_valid;
        for (int i = 1; i < int'(DELAY); i++) begin
          d_q[i] <= d_q[i-1];
          v_q[i] <= v_q[i-1];
        end
      end
    end
    assign dout       = d_q[DELAY-1];
    assign dout_valid = v_q[DELAY-1];
  end

endmodule
