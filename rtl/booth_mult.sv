// booth_mult: signed modified-Booth (radix-4) multiplier, A_W x B_W bits,
// split over two clock cycles.
//
// The multiplier operand b is recoded in bit pairs: each digit
// d_i = -2*b[2i+1] + b[2i] + b[2i-1] (b[-1] = 0) lies in {-2,-1,0,1,2}, so
// ceil(B_W/2) partial products d_i * a * 4^i replace B_W rows. The first three
// rows are summed in the cycle the operands arrive (stage 1) and registered;
// the remaining rows are added to that sum in the next cycle (stage 2).
//
// Interface and timing: a and b are sampled combinationally in cycle t (they
// come straight off the read busses); p is the exact A_W+B_W-bit signed product
// and is valid during cycle t+1, as a combinational function of the stage-1
// register. A new multiplication may start every cycle.
//
// The 16 x 9 size and the Booth recoding follow the PE chip's multiplier; the
// split into two stages follows its two-cycle multiplication. The adder tree
// inside each stage is left to synthesis, which is this design's choice.
module booth_mult #(
  parameter int unsigned A_W = 16,
  parameter int unsigned B_W = 9
) (
  input  logic                        clk,
  input  logic signed [A_W-1:0]       a,
  input  logic signed [B_W-1:0]       b,
  output logic signed [A_W+B_W-1:0]   p
);
  localparam int unsigned ND  = (B_W + 1) / 2;     // Booth digits
  localparam int unsigned NS1 = (ND + 1) / 2;      // digits summed in stage 1
  localparam int unsigned PWD = A_W + B_W;

  typedef logic signed [PWD-1:0] prod_t;

  // b sign-extended to an even width, with the implicit b[-1] = 0 below it
  logic signed [2*ND:0] bx;
  assign bx = {{(2*ND - B_W){b[B_W-1]}}, b, 1'b0};

  // one radix-4 partial product, already shifted into place
  function automatic prod_t booth_pp(input logic [2:0] trip,
                                     input logic signed [A_W-1:0] m,
                                     input int unsigned pos);
    prod_t mm;
    prod_t r;
    mm = prod_t'(m);
    unique case (trip)
      3'b000, 3'b111: r = '0;
      3'b001, 3'b010: r = mm;
      3'b011:         r = mm <<< 1;
      3'b100:         r = -(mm <<< 1);
      default:        r = -mm;            // 101, 110
    endcase
    return r <<< (2 * pos);
  endfunction

  // stage 1: first NS1 rows
  prod_t s1_sum;
  always_comb begin
    s1_sum = '0;
    for (int unsigned i = 0; i < NS1; i++)
      s1_sum += booth_pp(bx[2*i +: 3], a, i);
  end

  prod_t                s1_q;
  logic signed [A_W-1:0] a_q;
  logic [2*ND:0]         bx_q;
  always_ff @(posedge clk) begin
    s1_q <= s1_sum;
    a_q  <= a;
    bx_q <= bx;
  end

  // stage 2: remaining rows added to the stage-1 sum
  always_comb begin
    p = s1_q;
    for (int unsigned i = NS1; i < ND; i++)
      p += booth_pp(bx_q[2*i +: 3], a_q, i);
  end

endmodule
