// control_rom: control unit built as a read-only memory. The opcode indexes a
// ROM of 64 lines; each line holds the control word of that opcode, one bit per
// control signal (BR, JP, ALUinB, ALUop, DMwe, Rwe, Rdst, Rwd), plus a valid bit
// that marks opcodes the datapath implements. Lines of unimplemented opcodes are
// all zero, which writes nothing. The six filled lines are exactly the control
// table of the simple datapath:
//          BR JP ALUinB ALUop DMwe Rwe Rdst Rwd
//   add     0  0   0      0    0    1   1    0
//   addi    0  0   1      0    0    1   0    0
//   lw      0  0   1      0    0    1   0    1
//   sw      0  0   1      0    1    0   0    0
//   beq     1  0   0      1    0    0   0    0
//   j       0  1   0      0    0    0   0    0
// Don't-care entries of the table are stored as 0. The ROM contents are computed
// at elaboration by a function; the read is combinational. Opcode 0 is the add
// line; telling add from other R-type function codes is left to the exception
// logic. The opcode numbers are the standard MIPS ones.
module control_rom
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  output ctrl_t      ctrl,
  output logic       valid
);
  localparam int unsigned LINE_W = $bits(ctrl_t) + 1;
  typedef logic [LINE_W-1:0] rom_t [64];

  function automatic logic [LINE_W-1:0] line(input logic c_br, input logic c_jp,
                                             input logic c_alu_in_b, input logic c_alu_op,
                                             input logic c_dm_we, input logic c_r_we,
                                             input logic c_r_dst, input logic c_r_wd);
    return {1'b1, c_br, c_jp, c_alu_in_b, c_alu_op, c_dm_we, c_r_we, c_r_dst, c_r_wd};
  endfunction

  function automatic rom_t build_rom();
    rom_t r;
    for (int i = 0; i < 64; i++) r[i] = '0;
    //                      BR    JP    ALUinB ALUop DMwe  Rwe   Rdst  Rwd
    r[OP_RTYPE] = line(1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1, 1'b0); // add
    r[OP_ADDI]  = line(1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0); // addi
    r[OP_LW]    = line(1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1); // lw
    r[OP_SW]    = line(1'b0, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0); // sw
    r[OP_BEQ]   = line(1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0); // beq
    r[OP_J]     = line(1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0); // j
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  logic [LINE_W-1:0] word;
  assign word  = ROM[opcode];
  assign valid = word[LINE_W-1];
  assign ctrl  = ctrl_t'(word[LINE_W-2:0]);
endmodule
