// nn_processor: one processing element of the multiple-bus / multiple-FU
// neural network architecture.
//
// A neural network is run as a fixed schedule: the weights, constants and
// inputs sit in NB register files, one per global bus; NMAC multi-purpose MACs
// and NCMP winner-take-all comparators take their operands from the busses in
// the read phase of a cycle and put their results on the busses in the write
// phase, into a register file or out through an output unit. Several neurons
// share the same MAC (a virtual implementation), each MA operation folding one
// neuron's inputs and weights into a local register. Which word goes where in
// every cycle is fixed when the network is compiled and stored in the
// microcode controller, so the datapath has no instruction decoding, no
// branches and no bus arbitration.
//
// Interface:
//   start / busy / done       run the loaded schedule once (ucode_controller)
//   prog_*                    load the microcode while idle
//   host_*                    read and write any register-file word while idle
//   in_data[i]                input unit i (0: systolic link, 1: external)
//   out_data[o], out_valid[o] output unit o, valid the cycle after capture
//
// Timing: see mac_unit for FU latencies; a register-file word written in the
// write phase of cycle t is readable from cycle t+1.
//
// The organisation (busses, one register file per bus, MACs with local
// registers, comparator, I/O units, microcode with one word per phase) follows
// the document; the sizes in nnp_pkg default to its 3-bus / 2-MAC example.
module nn_processor
  import nnp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  input  logic             prog_we,
  input  logic [UA_W-1:0]  prog_addr,
  input  rd_word_t         prog_rd,
  input  wr_word_t         prog_wr,
  input  logic [UA_W:0]    prog_len,
  input  logic             host_we,
  input  logic [BSEL_W-1:0] host_rf,
  input  logic [RF_AW-1:0] host_addr,
  input  word_t            host_wdata,
  output word_t            host_rdata,
  input  word_t            in_data   [NIN],
  output word_t            out_data  [NOUT],
  output logic             out_valid [NOUT]
);
  rd_word_t rd_word;
  wr_word_t wr_word;

  ucode_controller u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .prog_we, .prog_addr, .prog_rd, .prog_wr, .prog_len,
    .rd_word, .wr_word
  );

  logic [RF_AW-1:0] rf_raddr [NB];
  word_t            rf_rdata [NB];
  logic             rf_we    [NB];
  logic [RF_AW-1:0] rf_waddr [NB];
  word_t            rf_wdata [NB];
  word_t            rf_hdata [NB];
  fu_op_e           fu_op    [NFU];
  logic [LR_W-1:0]  fu_lr    [NFU];
  word_t            fu_in1   [NFU];
  word_t            fu_in2   [NFU];
  word_t            fu_dout  [NFU];
  logic             fu_dvalid[NFU];
  logic             in_cap   [NIN];
  word_t            in_dout  [NIN];
  logic             out_en   [NOUT];
  word_t            out_din  [NOUT];
  word_t            rbus     [NB];
  word_t            wbus     [NB];
  logic [RF_AW-1:0] idx_off;

  bus_interconnect u_bus (
    .clk, .rst_n,
    .rd (rd_word), .wr (wr_word), .idx_off,
    .rf_raddr, .rf_rdata, .rf_we, .rf_waddr, .rf_wdata,
    .fu_op, .fu_lr, .fu_in1, .fu_in2, .fu_dout, .fu_dvalid,
    .in_cap, .in_dout, .out_en, .out_din,
    .rbus, .wbus
  );

  // ---------------- register files ----------------
  for (genvar b = 0; b < NB; b++) begin : g_rf
    regfile #(.WORDS(RF_WORDS), .W(DW)) u_rf (
      .clk,
      .raddr      (rf_raddr[b]),
      .rdata      (rf_rdata[b]),
      .we         (rf_we[b]),
      .waddr      (rf_waddr[b]),
      .wdata      (rf_wdata[b]),
      .host_we    (host_we && int'(host_rf) == b),
      .host_addr  (host_addr),
      .host_wdata (host_wdata),
      .host_rdata (rf_hdata[b])
    );
  end
  assign host_rdata = rf_hdata[host_rf];

  // ---------------- functional units ----------------
  for (genvar f = 0; f < NMAC; f++) begin : g_mac
    mac_unit u_mac (
      .clk, .rst_n,
      .op     (fu_op[f]),
      .lr     (fu_lr[f]),
      .in1    (fu_in1[f]),
      .in2    (fu_in2[f]),
      .dout   (fu_dout[f]),
      .dvalid (fu_dvalid[f])
    );
  end

  logic [RF_AW-1:0] cmp_win [NCMP];
  for (genvar c = 0; c < NCMP; c++) begin : g_cmp
    wta_comparator u_cmp (
      .clk, .rst_n,
      .op       (fu_op[NMAC + c]),
      .in1      (fu_in1[NMAC + c]),
      .in2      (fu_in2[NMAC + c]),
      .dout     (fu_dout[NMAC + c]),
      .dvalid   (fu_dvalid[NMAC + c]),
      .win_addr (cmp_win[c])
    );
  end
  // indexed addressing uses the first comparator's winner offset
  assign idx_off = cmp_win[0];

  // ---------------- I/O units ----------------
  for (genvar i = 0; i < NIN; i++) begin : g_in
    in_port u_in (
      .clk, .rst_n,
      .cap      (in_cap[i]),
      .ext_data (in_data[i]),
      .dout     (in_dout[i])
    );
  end
  for (genvar o = 0; o < NOUT; o++) begin : g_out
    out_port u_out (
      .clk, .rst_n,
      .en        (out_en[o]),
      .din       (out_din[o]),
      .ext_data  (out_data[o]),
      .ext_valid (out_valid[o])
    );
  end

  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n) !(host_we && busy))
    else $error("nn_processor: host write while running");

endmodule
