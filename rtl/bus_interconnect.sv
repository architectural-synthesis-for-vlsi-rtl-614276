// bus_interconnect: the NB global busses of a processor and their address
// decoding, for both clock phases.
//
// Read phase: bus b carries the word its register file reads at the address
// of the read-phase microcode word (plus the comparator's winner offset when
// the word marks the read as indexed). Every FU input latch has a multiplexer
// that picks one of the busses, so one bus value can feed several latches in
// the same cycle (a broadcast).
//
// Write phase: bus b is driven by at most one source, an FU output driver or
// an input unit, named in the write-phase word; the value is written into
// register file b when the word asks for it, and output units pick their value
// off any write bus. The tristate bus buffers are modelled as one-hot
// multiplexers, so an undriven bus reads as zero.
//
// Interface: purely combinational between the microcode words, the register
// files, the FUs and the I/O units. An assertion reports a write that names an
// FU which completes nothing that cycle. Full connectivity of busses to FUs is
// this design's choice; the document lets synthesis prune it.
module bus_interconnect
  import nnp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  rd_word_t         rd,
  input  wr_word_t         wr,
  input  logic [RF_AW-1:0] idx_off,
  // register files
  output logic [RF_AW-1:0] rf_raddr  [NB],
  input  word_t            rf_rdata  [NB],
  output logic             rf_we     [NB],
  output logic [RF_AW-1:0] rf_waddr  [NB],
  output word_t            rf_wdata  [NB],
  // functional units
  output fu_op_e           fu_op     [NFU],
  output logic [LR_W-1:0]  fu_lr     [NFU],
  output word_t            fu_in1    [NFU],
  output word_t            fu_in2    [NFU],
  input  word_t            fu_dout   [NFU],
  input  logic             fu_dvalid [NFU],
  // I/O units
  output logic             in_cap    [NIN],
  input  word_t            in_dout   [NIN],
  output logic             out_en    [NOUT],
  output word_t            out_din   [NOUT],
  // bus values, for observation
  output word_t            rbus      [NB],
  output word_t            wbus      [NB]
);
  // ---------------- read phase ----------------
  always_comb begin
    for (int b = 0; b < NB; b++) begin
      rf_raddr[b] = rd.bus[b].addr + (rd.bus[b].idx ? idx_off : '0);
      rbus[b]     = rf_rdata[b];
    end
    for (int f = 0; f < NFU; f++) begin
      fu_op[f]  = rd.fu[f].op;
      fu_lr[f]  = rd.fu[f].lr;
      // a select beyond the last bus reads zero
      fu_in1[f] = (int'(rd.fu[f].sel1) < NB) ? rbus[rd.fu[f].sel1] : '0;
      fu_in2[f] = (int'(rd.fu[f].sel2) < NB) ? rbus[rd.fu[f].sel2] : '0;
    end
    for (int i = 0; i < NIN; i++) in_cap[i] = rd.in_cap[i];
  end

  // ---------------- write phase ----------------
  always_comb begin
    for (int b = 0; b < NB; b++) begin
      wbus[b] = '0;
      for (int f = 0; f < NFU; f++)
        if (int'(wr.bus[b].src) == f + 1) wbus[b] = fu_dout[f];
      for (int i = 0; i < NIN; i++)
        if (int'(wr.bus[b].src) == NFU + 1 + i) wbus[b] = in_dout[i];
      rf_we[b]    = wr.bus[b].we;
      rf_waddr[b] = wr.bus[b].addr;
      rf_wdata[b] = wbus[b];
    end
    for (int o = 0; o < NOUT; o++) begin
      out_en[o]  = wr.outp[o].en;
      out_din[o] = (int'(wr.outp[o].sel) < NB) ? wbus[wr.outp[o].sel] : '0;
    end
  end

  // ---------------- scheduling rule ----------------
  for (genvar b = 0; b < NB; b++) begin : g_chk
    logic bad_src;
    always_comb begin
      bad_src = 1'b0;
      for (int f = 0; f < NFU; f++)
        if (int'(wr.bus[b].src) == f + 1 && !fu_dvalid[f]) bad_src = 1'b1;
    end
    a_src_valid: assert property (@(posedge clk) disable iff (!rst_n) !bad_src)
      else $error("bus_interconnect: bus %0d written from an FU with no result", b);
  end

endmodule
