// exc_detect: recognises exceptions and the privileged coprocessor-0 instructions
// in the instruction being executed. It is combinational and sits beside the
// control unit. It decodes mfc0, mtc0 and rfe (opcode COP0) and syscall (R-type
// function 0x0C), and finds these causes, highest priority first:
//   illegal instruction  (opcode or R-type function the datapath does not have)
//   privileged instruction in user mode (mfc0, mtc0 or rfe while not in kernel mode)
//   syscall
//   overflow             (signed overflow of add or addi)
//   unaligned load/store (lw/sw address not a multiple of 4)
// A cause is taken only if its bit in the exception mask register is set. kill
// tells the datapath to write nothing for this instruction: it is high when an
// exception is taken and for every instruction the datapath does not execute
// itself (syscall, coprocessor-0 instructions, illegal ones). Instructions of
// the extended subset (ext_valid) are legal and are not killed; none of them
// raises overflow. A masked overflow or
// unaligned access therefore completes normally, and a masked syscall or illegal
// instruction does nothing. Cause numbers and encodings are the standard MIPS ones;
// the priority order and the masking rule are this design's choices.
module exc_detect
  import mips_pkg::*;
#(
  parameter int unsigned XLEN = 32
) (
  input  logic [31:0]     insn,
  input  ctrl_t           ctrl,
  input  logic            ctrl_valid,
  input  logic            ext_valid,    // legal instruction of the extended subset
  input  logic            kernel,       // processor status: 1 = privileged mode
  input  logic            alu_overflow,
  input  logic [1:0]      addr_lo,      // low bits of the lw/sw address
  input  logic [XLEN-1:0] mask,         // exception mask register
  output logic            is_mfc0,
  output logic            is_mtc0,
  output logic            is_rfe,
  output logic            take,
  output exc_code_e       cause,
  output logic            addr_fault,   // taken exception is an address error
  output logic            kill
);
  logic [5:0] op, fn;
  logic [4:0] rs;
  logic       cop0, cop_mf, cop_mt, cop_rfe, cop_known;
  logic       rtype, syscall, illegal, priv, arith, unaligned;
  exc_code_e  raw;

  always_comb begin
    op  = insn[31:26];
    rs  = insn[25:21];
    fn  = insn[5:0];

    cop0      = (op == OP_COP0);
    cop_mf    = cop0 && (rs == COP_MF);
    cop_mt    = cop0 && (rs == COP_MT);
    cop_rfe   = cop0 && (rs == COP_CO) && (fn == FN_RFE);
    cop_known = cop_mf || cop_mt || cop_rfe;

    rtype   = (op == OP_RTYPE);
    syscall = rtype && (fn == FN_SYSCALL);
    illegal = !ext_valid &&
              ((rtype && fn != FN_ADD && !syscall) || (!rtype && !ctrl_valid && !cop_known));
    priv    = cop_known && !kernel;
    // add and addi are the instructions that write the ALU result to a register
    arith     = ctrl_valid && ctrl.r_we && !ctrl.r_wd && !(rtype && fn != FN_ADD);
    unaligned = ctrl_valid && (ctrl.r_wd || ctrl.dm_we) && (addr_lo != 2'b00);

    if (illegal)                     raw = EXC_RI;
    else if (priv)                   raw = EXC_CPU;
    else if (syscall)                raw = EXC_SYS;
    else if (arith && alu_overflow)  raw = EXC_OV;
    else if (unaligned && ctrl.r_wd) raw = EXC_ADEL;
    else if (unaligned)              raw = EXC_ADES;
    else                             raw = EXC_NONE;

    take       = (raw != EXC_NONE) && mask[raw];
    cause      = take ? raw : EXC_NONE;
    addr_fault = take && (raw == EXC_ADEL || raw == EXC_ADES);
    is_mfc0    = cop_mf && kernel;
    is_mtc0    = cop_mt && kernel;
    is_rfe     = cop_rfe && kernel;
    kill       = take || (!ext_valid && (!ctrl_valid || (rtype && fn != FN_ADD)));
  end
endmodule
