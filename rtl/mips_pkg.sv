// mips_pkg: types and constants shared by the single-cycle MIPS-subset processor.
//
// The instruction subset is add, addi, lw, sw, beq and j, plus the privileged
// coprocessor-0 instructions mfc0, mtc0, rfe and the syscall instruction used by
// the exception support. The optional extended subset adds sll, slt, jal and jr. The control word carries the eight control fields of the
// control table (BR, JP, ALUinB, ALUop, DMwe, Rwe, Rdst, Rwd). Opcode and function
// numbers, coprocessor-0 register numbers and exception codes are the standard
// MIPS ones; the instruction field layout (Op 6, rs 5, rt 5, rd 5, Sh 5, Func 6 /
// Immed 16 / Immed 26) is the MIPS one, as in the original datapath design.
package mips_pkg;

  // Primary opcodes (standard MIPS numbering)
  localparam logic [5:0] OP_RTYPE = 6'h00;  // add, syscall
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_COP0  = 6'h10;  // mfc0, mtc0, rfe
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // Function field of R-type instructions
  localparam logic [5:0] FN_ADD     = 6'h20;
  localparam logic [5:0] FN_SYSCALL = 6'h0C;
  localparam logic [5:0] FN_SLL     = 6'h00;  // extended subset
  localparam logic [5:0] FN_SLT     = 6'h2A;  // extended subset
  localparam logic [5:0] FN_JR      = 6'h08;  // extended subset

  // Primary opcode of the extended subset
  localparam logic [5:0] OP_JAL   = 6'h03;

  // Link register written by jal
  localparam logic [4:0] REG_RA   = 5'd31;

  // rs field of coprocessor-0 instructions
  localparam logic [4:0] COP_MF = 5'h00;
  localparam logic [4:0] COP_MT = 5'h04;
  localparam logic [4:0] COP_CO = 5'h10;  // with FN_RFE in the function field
  localparam logic [5:0] FN_RFE = 6'h10;

  // Coprocessor-0 register numbers
  localparam logic [4:0] CR_BADVADDR = 5'd8;
  localparam logic [4:0] CR_MASK     = 5'd12;
  localparam logic [4:0] CR_CAUSE    = 5'd13;
  localparam logic [4:0] CR_EPC      = 5'd14;

  // Exception codes, stored in cause register bits [6:2]
  typedef enum logic [4:0] {
    EXC_NONE = 5'd0,
    EXC_ADEL = 5'd4,   // unaligned load address
    EXC_ADES = 5'd5,   // unaligned store address
    EXC_SYS  = 5'd8,   // syscall
    EXC_RI   = 5'd10,  // illegal (reserved) instruction
    EXC_CPU  = 5'd11,  // privileged instruction in user mode
    EXC_OV   = 5'd12   // arithmetic overflow in add or addi
  } exc_code_e;

  // ALU operation (the control table uses 0 = add, 1 = subtract)
  typedef enum logic [0:0] {
    ALU_ADD = 1'b0,
    ALU_SUB = 1'b1
  } alu_op_e;

  // Control word: one field per column of the control table
  typedef struct packed {
    logic    br;       // BR: instruction is a conditional branch
    logic    jp;       // JP: instruction is a jump
    logic    alu_in_b; // ALUinB: 1 selects the sign-extended immediate
    alu_op_e alu_op;   // ALUop
    logic    dm_we;    // DMwe: data memory write enable
    logic    r_we;     // Rwe: register file write enable
    logic    r_dst;    // Rdst: 1 selects rd, 0 selects rt
    logic    r_wd;     // Rwd: 1 selects data memory output, 0 the ALU result
  } ctrl_t;

  // Extended-subset decode: at most one bit is set
  typedef struct packed {
    logic sll;  // rd = rt << sh
    logic slt;  // rd = (rs < rt, signed) ? 1 : 0
    logic jal;  // $31 = PC+4, jump
    logic jr;   // PC = rs
  } ext_t;

endpackage
