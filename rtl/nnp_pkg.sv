// nnp_pkg: configuration, number format, operation codes and microcode word
// layouts shared by every block of the multiple-bus / multiple-FU neural
// processor.
//
// The processor is a set of NB global busses, one register file per bus, and
// NFU functional units (NMAC multiply-accumulate units followed by NCMP
// winner-take-all comparators). A microcode controller issues one control word
// for the read phase and one for the write phase of every clock cycle.
//
// Sizes: 3 busses and 2 MACs follow the XOR example processor, the 512 x 16
// register file and the 16 x 9 multiplier / 25-bit adder follow the PE chip.
// The binary point of the words, the comparator count, the I/O unit count and
// the microcode depth are this design's choices.
package nnp_pkg;

  // ---------------- configuration ----------------
  localparam int unsigned NB       = 3;     // busses = register files
  localparam int unsigned NMAC     = 2;     // multi-purpose MACs
  localparam int unsigned NCMP     = 1;     // winner-take-all comparators
  localparam int unsigned NFU      = NMAC + NCMP;
  localparam int unsigned NLR      = 2;     // local registers per MAC
  localparam int unsigned NIN      = 2;     // input units (0: systolic link, 1: external)
  localparam int unsigned NOUT     = 2;     // output units (0: systolic link, 1: external)
  localparam int unsigned RF_WORDS = 512;   // words per register file
  localparam int unsigned UDEPTH   = 2048;  // microcode cycles

  // ---------------- number format ----------------
  localparam int unsigned DW     = 16;      // data word, Q8.8
  localparam int unsigned DFRAC  = 8;
  localparam int unsigned CW     = 9;       // coefficient, Q2.7 (low bits of in2)
  localparam int unsigned CFRAC  = 7;
  localparam int unsigned PW     = DW + CW; // product / accumulator, Q10.15
  localparam logic signed [DW-1:0] ONE   = DW'(1 << DFRAC);
  localparam logic signed [DW-1:0] DMAX  = {1'b0, {(DW-1){1'b1}}};
  localparam logic signed [DW-1:0] DMIN  = {1'b1, {(DW-1){1'b0}}};

  // ---------------- derived widths ----------------
  localparam int unsigned RF_AW  = $clog2(RF_WORDS);
  localparam int unsigned BSEL_W = (NB > 1) ? $clog2(NB) : 1;
  localparam int unsigned LR_W   = (NLR > 1) ? $clog2(NLR) : 1;
  localparam int unsigned UA_W   = $clog2(UDEPTH);
  // write-bus source: 0 = none, 1..NFU = FU k-1, NFU+1..NFU+NIN = input unit
  localparam int unsigned NSRC   = 1 + NFU + NIN;
  localparam int unsigned SRC_W  = $clog2(NSRC);

  typedef logic signed [DW-1:0] word_t;
  typedef logic signed [PW-1:0] acc_t;

  // ---------------- functional-unit operations ----------------
  typedef enum logic [3:0] {
    OP_NOP       = 4'd0,
    OP_ADD       = 4'd1,   // in1 + in2                      1 cycle
    OP_SUB       = 4'd2,   // in1 - in2                      1 cycle
    OP_MULT      = 4'd3,   // in1 * coef(in2)                2 cycles
    OP_MA_ACC    = 4'd4,   // lr += in1 * coef(in2)          3 cycles, no output
    OP_MA_OUT    = 4'd5,   // out = lr + in1*coef(in2); lr=0 3 cycles
    OP_THRESH    = 4'd6,   // out = (in1 > in2) ? 1.0 : 0    1 cycle
    OP_HLIM      = 4'd7,   // out = (in1 > 0) ? +in2 : -in2  1 cycle
    OP_CLIP      = 4'd8,   // out = in1 limited to +-|in2|   1 cycle
    OP_ACC_LD    = 4'd9,   // lr = in1 (aligned)             1 cycle, no output
    OP_CMP_FIRST = 4'd10,  // comparator: start a search
    OP_CMP_NEXT  = 4'd11   // comparator: compare next candidate
  } fu_op_e;

  // ---------------- microcode words ----------------
  typedef struct packed {
    fu_op_e              op;
    logic [LR_W-1:0]     lr;
    logic [BSEL_W-1:0]   sel1;    // bus feeding input latch 1
    logic [BSEL_W-1:0]   sel2;    // bus feeding input latch 2
  } fu_ctl_t;

  typedef struct packed {
    logic                idx;     // add the comparator's winner offset
    logic [RF_AW-1:0]    addr;    // register-file read address
  } rbus_ctl_t;

  typedef struct packed {
    fu_ctl_t   [NFU-1:0]  fu;
    rbus_ctl_t [NB-1:0]   bus;
    logic      [NIN-1:0]  in_cap;  // input units latch
  } rd_word_t;

  typedef struct packed {
    logic [SRC_W-1:0]    src;     // who drives the bus in the write phase
    logic                we;      // write the bus value into the register file
    logic [RF_AW-1:0]    addr;
  } wbus_ctl_t;

  typedef struct packed {
    logic                en;
    logic [BSEL_W-1:0]   sel;     // write bus captured by the output unit
  } out_ctl_t;

  typedef struct packed {
    wbus_ctl_t [NB-1:0]   bus;
    out_ctl_t  [NOUT-1:0] outp;
  } wr_word_t;

  // ---------------- arithmetic helpers ----------------
  // Saturate a product-scaled value (Q10.15) back to a data word (Q8.8).
  function automatic word_t sat_scale(input acc_t v);
    acc_t s;
    s = v >>> CFRAC;
    if (s > acc_t'(DMAX))      return DMAX;
    else if (s < acc_t'(DMIN)) return DMIN;
    else                       return word_t'(s);
  endfunction

  // Saturate a data-scaled wide value to a data word.
  function automatic word_t sat_word(input acc_t v);
    if (v > acc_t'(DMAX))      return DMAX;
    else if (v < acc_t'(DMIN)) return DMIN;
    else                       return word_t'(v);
  endfunction

endpackage
