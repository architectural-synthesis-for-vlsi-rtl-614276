// regfile: the register file (RAM) that sits on one bus.
//
// Every bus has its own register file. In the read phase of a cycle the file
// puts the word at raddr on its bus; in the write phase it stores the word the
// bus carries when we is set. Both phases fit in one clock cycle here: the read
// is asynchronous and the write happens at the clock edge that ends the cycle,
// so a word written in cycle t is readable from cycle t+1, and a read and a
// write of the same address in one cycle return the old word (read phase
// first).
//
// A host port writes and reads words for loading weights, constants and inputs
// and for collecting results while the processor is idle; a host write wins
// over a write-phase write to the same cycle. The 512 x 16 size follows the PE
// chip's SRAM; the host port is this design's choice.
module regfile #(
  parameter int unsigned WORDS = 512,
  parameter int unsigned W     = 16,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  logic [W-1:0]  host_wdata,
  output logic [W-1:0]  host_rdata
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (host_we)  mem[host_addr] <= host_wdata;
    else if (we)  mem[waddr]     <= wdata;
  end

  assign rdata      = mem[raddr];
  assign host_rdata = mem[host_addr];

endmodule
