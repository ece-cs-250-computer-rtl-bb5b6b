// control_logic: control unit built as combinational logic around a decoder.
// The opcode drives a decoder with one output line per implemented instruction
// (add, addi, lw, sw, beq, j), exactly one of which is high (one-hot). Each control
// signal is then a single decoder line or the OR of a few: BR = beq, JP = j,
// DMwe = sw, Rwd = lw, Rdst = add, ALUop = beq, Rwe = add | addi | lw and
// ALUinB = addi | lw | sw. This gives the same control words as the control ROM
// (with the table's don't-cares read as 0) using only a handful of gates, because
// most signals are 1 for few instructions. valid is the OR of all decoder lines.
// Combinational; opcode numbers are the standard MIPS ones.
module control_logic
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  output ctrl_t      ctrl,
  output logic       valid
);
  typedef struct packed {
    logic add, addi, lw, sw, beq, j;
  } dec_t;

  dec_t dec;

  always_comb begin
    dec      = '0;
    dec.add  = (opcode == OP_RTYPE);
    dec.addi = (opcode == OP_ADDI);
    dec.lw   = (opcode == OP_LW);
    dec.sw   = (opcode == OP_SW);
    dec.beq  = (opcode == OP_BEQ);
    dec.j    = (opcode == OP_J);

    ctrl.br       = dec.beq;
    ctrl.jp       = dec.j;
    ctrl.dm_we    = dec.sw;
    ctrl.r_wd     = dec.lw;
    ctrl.r_dst    = dec.add;
    ctrl.alu_op   = dec.beq ? ALU_SUB : ALU_ADD;
    ctrl.r_we     = dec.add | dec.addi | dec.lw;
    ctrl.alu_in_b = dec.addi | dec.lw | dec.sw;
    valid         = |dec;
  end
endmodule
