// nn_systolic_array: NPE neural processors in a one-dimensional circular
// systolic array, the multi-processor form of the architecture.
//
// A network too large or too slow for one processor is cut into partitions of
// equal shape, one per processor. Every processor runs the same schedule
// (SIMD) on its own partition's weights, so the microcode is loaded once and
// broadcast to all controllers, and one start runs them in lock step. Neuron
// values another partition needs travel around the ring: output unit 0 of PE i
// drives, through an O/I link with LINK_DELAY cycles of interconnection delay,
// input unit 0 of PE (i+1) mod NPE. The schedule places each input capture
// LINK_DELAY + 1 cycles after the matching output capture.
//
// Interface:
//   start / busy / done             all PEs together (PE 0's status)
//   prog_*                          microcode, written into every PE
//   host_pe, host_*                 register-file access of one PE while idle
//   ext_in[p]                       input unit 1 of PE p
//   ext_out[p], ext_out_valid[p]    output unit 1 of PE p
//
// The circular array of identical processors with input/output units on the
// busses follows the document; two PEs, one link per neighbour and a one-cycle
// link are this design's defaults.
module nn_systolic_array
  import nnp_pkg::*;
#(
  parameter int unsigned NPE        = 2,
  parameter int unsigned LINK_DELAY = 1,
  localparam int unsigned PE_W      = (NPE > 1) ? $clog2(NPE) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic              prog_we,
  input  logic [UA_W-1:0]   prog_addr,
  input  rd_word_t          prog_rd,
  input  wr_word_t          prog_wr,
  input  logic [UA_W:0]     prog_len,
  input  logic [PE_W-1:0]   host_pe,
  input  logic              host_we,
  input  logic [BSEL_W-1:0] host_rf,
  input  logic [RF_AW-1:0]  host_addr,
  input  word_t             host_wdata,
  output word_t             host_rdata,
  input  word_t             ext_in        [NPE],
  output word_t             ext_out       [NPE],
  output logic              ext_out_valid [NPE]
);
  word_t pe_in    [NPE][NIN];
  word_t pe_out   [NPE][NOUT];
  logic  pe_ov    [NPE][NOUT];
  word_t pe_hdata [NPE];
  logic  pe_busy  [NPE];
  logic  pe_done  [NPE];
  word_t link_d   [NPE];
  logic  link_v   [NPE];

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    nn_processor u_pe (
      .clk, .rst_n, .start,
      .busy       (pe_busy[p]),
      .done       (pe_done[p]),
      .prog_we, .prog_addr, .prog_rd, .prog_wr, .prog_len,
      .host_we    (host_we && int'(host_pe) == p),
      .host_rf, .host_addr, .host_wdata,
      .host_rdata (pe_hdata[p]),
      .in_data    (pe_in[p]),
      .out_data   (pe_out[p]),
      .out_valid  (pe_ov[p])
    );

    // systolic link from this PE to the next one around the ring
    oi_link #(.DELAY(LINK_DELAY)) u_link (
      .clk, .rst_n,
      .din        (pe_out[p][0]),
      .din_valid  (pe_ov[p][0]),
      .dout       (link_d[p]),
      .dout_valid (link_v[p])
    );

    assign pe_in[(p + 1) % NPE][0] = link_d[p];
    assign pe_in[p][1]             = ext_in[p];
    assign ext_out[p]              = pe_out[p][1];
    assign ext_out_valid[p]        = pe_ov[p][1];
  end

  assign busy       = pe_busy[0];
  assign done       = pe_done[0];
  assign host_rdata = pe_hdata[host_pe];

endmodule
