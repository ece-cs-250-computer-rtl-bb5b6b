// alu: the arithmetic unit of the datapath. ALUop 0 adds the two inputs (add,
// addi and the address of lw and sw), ALUop 1 subtracts in2 from in1 (beq, which
// then branches on the zero flag). zero is high when the result is zero; overflow
// is high when the signed result does not fit in XLEN bits, which the exception
// logic turns into an overflow exception for add and addi. Purely combinational.
// The two operations and the zero output are what the control table and the beq
// datapath need; the overflow output is this design's addition for exceptions.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] in1,
  input  logic [XLEN-1:0] in2,
  input  alu_op_e         op,
  output logic [XLEN-1:0] result,
  output logic            zero,
  output logic            overflow
);
  logic [XLEN-1:0] b_eff;

  always_comb begin
    b_eff    = (op == ALU_SUB) ? ~in2 : in2;
    result   = in1 + b_eff + XLEN'(op == ALU_SUB);
    zero     = (result == '0);
    // Signed overflow: operands of equal sign giving a result of the other sign
    overflow = (in1[XLEN-1] == b_eff[XLEN-1]) && (result[XLEN-1] != in1[XLEN-1]);
  end
endmodule
