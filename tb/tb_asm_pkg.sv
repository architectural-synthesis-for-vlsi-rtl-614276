// tb_asm_pkg: a small microcode assembler for the testbenches.
//
// A testbench builds a schedule cycle by cycle: fu() issues an operation on a
// functional unit and sets the read addresses of the busses feeding its two
// input latches, wb() names the unit that drives a bus in the write phase and
// where the value is stored, outp() and incap() control the I/O units. A bus
// can carry only one word per phase; the assembler counts every attempt to
// read two different words on one bus, or drive one bus twice, as an error.
// Number helpers convert reals to the Q8.8 data and Q2.7 coefficient formats.
package tb_asm_pkg;
  import nnp_pkg::*;

  localparam int unsigned MAXC = 1024;  // cycles a test schedule may use

  rd_word_t prg_rd [MAXC];
  wr_word_t prg_wr [MAXC];
  bit       rd_used [MAXC][NB];
  bit       wr_used [MAXC][NB];
  int       prg_len;
  int       asm_errors;

  function automatic void clear();
    for (int c = 0; c < MAXC; c++) begin
      prg_rd[c] = '0;
      prg_wr[c] = '0;
      for (int b = 0; b < NB; b++) begin
        rd_used[c][b] = 0;
        wr_used[c][b] = 0;
      end
    end
    prg_len    = 0;
    asm_errors = 0;
  endfunction

  function automatic void touch(int c);
    if (c + 1 > prg_len) prg_len = c + 1;
  endfunction

  function automatic void rbus(int c, int b, int addr, bit idx);
    if (rd_used[c][b] && (int'(prg_rd[c].bus[b].addr) != addr || prg_rd[c].bus[b].idx != idx)) begin
      $display("ASM: cycle %0d bus %0d read twice", c, b);
      asm_errors++;
    end
    rd_used[c][b]           = 1;
    prg_rd[c].bus[b].addr   = RF_AW'(addr);
    prg_rd[c].bus[b].idx    = idx;
  endfunction

  // issue op on FU f in cycle c: latch 1 from bus b1 at a1, latch 2 from b2 at a2
  function automatic void fu(int c, int f, fu_op_e op, int lr, int b1, int a1, int b2, int a2,
                             bit idx1 = 0, bit idx2 = 0);
    prg_rd[c].fu[f].op   = op;
    prg_rd[c].fu[f].lr   = LR_W'(lr);
    prg_rd[c].fu[f].sel1 = BSEL_W'(b1);
    prg_rd[c].fu[f].sel2 = BSEL_W'(b2);
    rbus(c, b1, a1, idx1);
    rbus(c, b2, a2, idx2);
    touch(c);
  endfunction

  function automatic int src_fu(int f);   return f + 1;         endfunction
  function automatic int src_in(int i);   return NFU + 1 + i;   endfunction

  // write phase of cycle c: bus b driven by src, stored at addr when we
  function automatic void wb(int c, int b, int src, bit we, int addr);
    if (wr_used[c][b]) begin
      $display("ASM: cycle %0d bus %0d driven twice", c, b);
      asm_errors++;
    end
    wr_used[c][b]         = 1;
    prg_wr[c].bus[b].src  = SRC_W'(src);
    prg_wr[c].bus[b].we   = we;
    prg_wr[c].bus[b].addr = RF_AW'(addr);
    touch(c);
  endfunction

  function automatic void outp(int c, int o, int b);
    prg_wr[c].outp[o].en  = 1'b1;
    prg_wr[c].outp[o].sel = BSEL_W'(b);
    touch(c);
  endfunction

  function automatic void incap(int c, int i);
    prg_rd[c].in_cap[i] = 1'b1;
    touch(c);
  endfunction

  // ---------------- number formats ----------------
  function automatic word_t q88(real r);
    return word_t'($rtoi(r * 256.0 + (r >= 0 ? 0.5 : -0.5)));
  endfunction
  function automatic word_t coef(real r);   // Q2.7 value, sign-extended to a word
    return word_t'($rtoi(r * 128.0 + (r >= 0 ? 0.5 : -0.5)));
  endfunction

endpackage
