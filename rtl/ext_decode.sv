// ext_decode: decoder for the optional extended instructions sll, slt, jal and
// jr. Each needs a datapath path the six-instruction machine lacks: sll a
// shifter, slt the ALU's less-than bit zero-extended into the register write-back
// multiplexer, jal PC+4 into the write-back multiplexer with $31 as an implicit
// destination, and jr a register value into the PC multiplexer. The decoder
// raises one line per instruction (one-hot, like the main control decoder) from
// the opcode and, for the R-type ones, the function field. With ENABLE = 0 every
// output is 0 and those encodings stay illegal instructions. Combinational;
// encodings are the standard MIPS ones. sll with every field zero is the MIPS nop
// and executes as a write of zero to $0.
module ext_decode
  import mips_pkg::*;
#(
  parameter bit ENABLE = 1'b1
) (
  input  logic [5:0] opcode,
  input  logic [5:0] funct,
  output ext_t       ext,
  output logic       valid
);
  logic rtype;

  always_comb begin
    rtype   = (opcode == OP_RTYPE);
    ext.sll = ENABLE && rtype && (funct == FN_SLL);
    ext.slt = ENABLE && rtype && (funct == FN_SLT);
    ext.jr  = ENABLE && rtype && (funct == FN_JR);
    ext.jal = ENABLE && (opcode == OP_JAL);
    valid   = |ext;
  end
endmodule
