// ucode_controller: microcode controller of one processor.
//
// The controller is a RAM holding one control word for each clock phase of the
// schedule: a read-phase word (FU operations, input-latch bus selects,
// register-file read addresses, input-unit captures) and a write-phase word
// (which unit drives each bus, register-file writes, output-unit captures).
// A schedule is straight-line code: after start the controller steps through
// cycles 0 .. prog_len-1 once, one cycle per clock, with no branches, then
// returns to idle. While idle it issues all-zero words, which are no-ops.
//
// Interface: the two word RAMs are loaded through prog_we / prog_addr /
// prog_rd / prog_wr while idle. start (one cycle, while idle) begins a run in
// the next cycle; busy is high for exactly prog_len cycles and done pulses in
// the cycle after the last one. rd_word / wr_word are the words of the current
// cycle, read asynchronously from the RAMs.
//
// One word per clock phase and straight-line code follow the document; the
// load port, handshake and the depth of 2048 cycles are this design's choices.
module ucode_controller
  import nnp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            done,
  input  logic            prog_we,
  input  logic [UA_W-1:0] prog_addr,
  input  rd_word_t        prog_rd,
  input  wr_word_t        prog_wr,
  input  logic [UA_W:0]   prog_len,
  output rd_word_t        rd_word,
  output wr_word_t        wr_word
);
  rd_word_t rd_mem [UDEPTH];
  wr_word_t wr_mem [UDEPTH];

  logic [UA_W-1:0] pc_q;
  logic            run_q;

  always_ff @(posedge clk) begin
    if (prog_we) begin
      rd_mem[prog_addr] <= prog_rd;
      wr_mem[prog_addr] <= prog_wr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q  <= '0;
      run_q <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run_q) begin
        if (start && prog_len != 0) begin
          run_q <= 1'b1;
          pc_q  <= '0;
        end
      end else if ({1'b0, pc_q} == prog_len - 1'b1) begin
        run_q <= 1'b0;
        done  <= 1'b1;
      end else begin
        pc_q <= pc_q + 1'b1;
      end
    end
  end

  assign busy    = run_q;
  assign rd_word = run_q ? rd_mem[pc_q] : '0;
  assign wr_word = run_q ? wr_mem[pc_q] : '0;

  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n) !(prog_we && run_q))
    else $error("ucode_controller: microcode written while running");

endmodule
