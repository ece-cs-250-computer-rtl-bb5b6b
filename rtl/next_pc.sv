// next_pc: the fetch-side arithmetic that chooses the next program counter.
// A +4 incrementer gives PC+4, the address of the next sequential instruction
// (instructions are 4 bytes and memory is byte addressed). For beq the
// sign-extended immediate is shifted left by two (it counts instructions) and
// added to PC+4; an AND gate of BR and the ALU zero flag selects that branch
// target in the first multiplexer. For j the 26-bit immediate is shifted left by
// two and placed below the top four bits of PC+4; JP selects it in the second
// multiplexer. Combinational. The units and the order of the two multiplexers
// follow the original datapath; taking the upper four jump-target bits from PC+4
// is the standard MIPS rule.
module next_pc #(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] pc,
  input  logic [XLEN-1:0] imm_sx,  // sign-extended 16-bit immediate
  input  logic [25:0]     jimm,    // 26-bit jump immediate
  input  logic            br,      // BR control
  input  logic            jp,      // JP control
  input  logic            zero,    // ALU zero flag
  output logic [XLEN-1:0] pc_plus4,
  output logic            branch_taken,
  output logic [XLEN-1:0] next
);
  logic [XLEN-1:0] br_target, j_target, after_br;

  always_comb begin
    pc_plus4     = pc + XLEN'(4);
    br_target    = pc_plus4 + (imm_sx << 2);
    j_target     = {pc_plus4[XLEN-1:28], jimm, 2'b00};
    branch_taken = br & zero;
    after_br     = branch_taken ? br_target : pc_plus4;
    next         = jp ? j_target : after_br;
  end
endmodule
