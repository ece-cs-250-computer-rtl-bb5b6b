// mips_cpu: a single-cycle processor for a MIPS subset (add, addi, lw, sw, beq, j)
// with exception support (syscall, overflow, illegal and privileged instructions,
// unaligned accesses; mfc0, mtc0 and rfe to manage them).
//
// Every instruction takes one clock cycle (CPI = 1). During the cycle the PC
// addresses the instruction memory; the instruction's register fields address
// the register file (rs, rt read; rd or rt written, chosen by Rdst); the ALU adds
// rs and either rt or the sign-extended immediate (ALUinB), or subtracts for beq;
// the ALU result addresses the data memory, whose write data is rt; and the value
// written back is the ALU result or the loaded word (Rwd). The next PC is PC+4,
// the branch target when BR and the ALU zero flag are both set, or the jump
// target when JP is set. Everything is written on the same rising clock edge at
// the end of the cycle: data memory, register file, coprocessor-0 registers and
// PC. The control word comes from the control ROM (USE_CONTROL_ROM = 1) or from
// the equivalent decoder logic (USE_CONTROL_ROM = 0).
//
// Exceptions: exc_detect finds a cause in the same cycle; the instruction then
// writes neither register file nor memory, its PC goes to EPC (the CRwd
// multiplexer selects the PC), the cause is recorded, the processor enters
// privileged mode and the next PC is HANDLER_ADDR (the PCwC multiplexer). mfc0
// passes a coprocessor-0 register through the ALU (the ALUinAC multiplexer
// selects it as ALU input A, input B is forced to zero) into rt; mtc0 writes rt
// into a coprocessor-0 register; rfe leaves privileged mode and continues at EPC.
// The handler address, the rfe jump to EPC and the forced-zero ALU input are this
// design's choices; the rest of the datapath follows the original design.
//
// Extended subset (EXTENDED_ISA = 1, off by default): sll through a shifter on
// rt, slt as a subtraction whose less-than bit is zero-extended into the
// write-back multiplexer, jal writing PC+4 into $31 and jumping, jr loading the
// PC from rs. These are the extra paths the further instructions need; the main
// configuration is the six-instruction machine of the control table.
//
// Loading: while rst is high the processor is held and the load port writes
// words into instruction memory (load_dmem = 0) or data memory (load_dmem = 1).
// The observation outputs show the instruction being executed and the writes it
// makes at the coming clock edge.
module mips_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS      = 1024,
  parameter int unsigned DMEM_WORDS      = 1024,
  parameter bit          USE_CONTROL_ROM = 1'b1,
  parameter bit          EXTENDED_ISA    = 1'b0,
  parameter logic [31:0] RESET_PC        = 32'h0000_0000,
  parameter logic [31:0] HANDLER_ADDR    = 32'h8000_0080
) (
  input  logic        clk,
  input  logic        rst,
  // program / data loading, used while rst is high
  input  logic        load_we,
  input  logic        load_dmem,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  // observation of the instruction being executed
  output logic [31:0] pc,
  output logic [31:0] insn,
  output logic        rf_we,
  output logic [4:0]  rf_waddr,
  output logic [31:0] rf_wdata,
  output logic        dm_we,
  output logic [31:0] dm_addr,
  output logic [31:0] dm_wdata,
  output logic        branch_taken,
  output logic        exc_taken,
  output exc_code_e   exc_cause,
  output logic        kernel_mode
);
  localparam int unsigned XLEN = 32;

  // ---------------- fetch ----------------
  logic [XLEN-1:0] pc_next, imem_addr, imem_rdata;

  we_register #(.N(XLEN), .RESET_VAL(RESET_PC)) u_pc (
    .clk, .rst, .we(1'b1), .d(pc_next), .q(pc)
  );

  assign imem_addr = rst ? load_addr : pc;

  memory #(.XLEN(XLEN), .WORDS(IMEM_WORDS)) u_imem (
    .clk, .we(rst && load_we && !load_dmem), .addr(imem_addr),
    .wdata(load_data), .rdata(imem_rdata)
  );
  assign insn = imem_rdata;

  // ---------------- decode ----------------
  logic [5:0]  opcode;
  logic [4:0]  f_rs, f_rt, f_rd;
  logic [15:0] f_imm;
  logic [25:0] f_jimm;
  logic [4:0]  f_sh;
  logic [5:0]  f_fn;

  assign opcode = insn[31:26];
  assign f_rs   = insn[25:21];
  assign f_rt   = insn[20:16];
  assign f_rd   = insn[15:11];
  assign f_imm  = insn[15:0];
  assign f_jimm = insn[25:0];
  assign f_sh   = insn[10:6];
  assign f_fn   = insn[5:0];

  ctrl_t ctrl, ctrl_eff;
  logic  ctrl_valid;

  if (USE_CONTROL_ROM) begin : g_ctrl
    control_rom u_ctrl (.opcode, .ctrl, .valid(ctrl_valid));
  end else begin : g_ctrl
    control_logic u_ctrl (.opcode, .ctrl, .valid(ctrl_valid));
  end

  // Extended subset (sll, slt, jal, jr); all lines stay 0 when EXTENDED_ISA = 0
  ext_t ext;
  logic ext_valid;

  ext_decode #(.ENABLE(EXTENDED_ISA)) u_ext (.opcode, .funct(f_fn), .ext, .valid(ext_valid));

  // ---------------- execute ----------------
  logic [XLEN-1:0] rs1val, rs2val, imm_sx, alu_a, alu_b, alu_y;
  logic [XLEN-1:0] cr_rdata, epc, mask, dmem_rdata, pc_seq, pc_plus4, shift_y;
  logic            alu_zero, alu_ovf, kernel, slt_bit;
  alu_op_e         alu_op;
  logic            is_mfc0, is_mtc0, is_rfe, take, addr_fault, kill;
  exc_code_e       cause;

  sign_extend #(.IN_W(16), .OUT_W(XLEN)) u_sx (.in(f_imm), .out(imm_sx));

  // ALUinAC: coprocessor register into ALU input A for mfc0
  assign alu_a = is_mfc0 ? cr_rdata : rs1val;
  assign alu_b = is_mfc0 ? '0 : (ctrl.alu_in_b ? imm_sx : rs2val);

  // slt subtracts like beq and keeps only the sign of the true difference
  assign alu_op  = ext.slt ? ALU_SUB : ctrl.alu_op;
  assign slt_bit = alu_y[XLEN-1] ^ alu_ovf;

  alu #(.XLEN(XLEN)) u_alu (
    .in1(alu_a), .in2(alu_b), .op(alu_op),
    .result(alu_y), .zero(alu_zero), .overflow(alu_ovf)
  );

  exc_detect #(.XLEN(XLEN)) u_exc (
    .insn, .ctrl, .ctrl_valid, .ext_valid, .kernel, .alu_overflow(alu_ovf),
    .addr_lo(alu_y[1:0]), .mask,
    .is_mfc0, .is_mtc0, .is_rfe, .take, .cause, .addr_fault, .kill
  );

  // An instruction that is killed keeps its ALU operation (the ALU is driven
  // from the raw control word, so the overflow and address checks see its
  // result) but loses every write and PC change.
  always_comb begin
    ctrl_eff = ctrl;
    if (kill) begin
      ctrl_eff.br    = 1'b0;
      ctrl_eff.jp    = 1'b0;
      ctrl_eff.dm_we = 1'b0;
      ctrl_eff.r_we  = 1'b0;
    end
  end

  shifter #(.XLEN(XLEN)) u_shift (.in(rs2val), .shamt(f_sh), .out(shift_y));

  // Register destination (Rdst) and write data (Rwd); mfc0 writes rt. The
  // extended subset adds $31 as a destination and the shifter, the zero-extended
  // less-than bit and PC+4 as write data; jr writes nothing.
  assign rf_we    = !rst && !take &&
                    ((ctrl_eff.r_we && !ext.jr) || is_mfc0 || ext.jal);
  assign rf_waddr = ext.jal ? REG_RA : (ctrl_eff.r_dst ? f_rd : f_rt);
  always_comb begin
    if (ext.jal)           rf_wdata = pc_plus4;
    else if (ext.sll)      rf_wdata = shift_y;
    else if (ext.slt)      rf_wdata = XLEN'(slt_bit);
    else if (ctrl_eff.r_wd) rf_wdata = dmem_rdata;
    else                   rf_wdata = alu_y;
  end

  regfile #(.XLEN(XLEN), .NREGS(32)) u_rf (
    .clk, .rst, .we(rf_we), .rd(rf_waddr), .rdval(rf_wdata),
    .rs1(f_rs), .rs2(f_rt), .rs1val, .rs2val
  );

  // ---------------- memory ----------------
  assign dm_we    = !rst && ctrl_eff.dm_we;
  assign dm_addr  = alu_y;
  assign dm_wdata = rs2val;

  memory #(.XLEN(XLEN), .WORDS(DMEM_WORDS)) u_dmem (
    .clk,
    .we(rst ? (load_we && load_dmem) : dm_we),
    .addr(rst ? load_addr : dm_addr),
    .wdata(rst ? load_data : dm_wdata),
    .rdata(dmem_rdata)
  );

  // ---------------- exceptions ----------------
  logic            cr_we;
  logic [4:0]      cr_waddr;
  logic [XLEN-1:0] cr_wdata;

  assign cr_we    = !rst && (take || is_mtc0);
  assign cr_waddr = take ? CR_EPC : f_rd;
  assign cr_wdata = take ? pc : rs2val;   // CRwd

  cp0 #(.XLEN(XLEN)) u_cp0 (
    .clk, .rst, .raddr(f_rd), .rdata(cr_rdata),
    .we(cr_we), .waddr(cr_waddr), .wdata(cr_wdata),
    .exc(!rst && take), .exc_cause(cause), .badaddr_we(addr_fault), .badaddr(alu_y),
    .rfe(!rst && is_rfe && !take), .epc, .mask, .kernel
  );

  // ---------------- next PC ----------------
  next_pc #(.XLEN(XLEN)) u_npc (
    .pc, .imm_sx, .jimm(f_jimm), .br(ctrl_eff.br), .jp(ctrl_eff.jp || (ext.jal && !take)),
    .zero(alu_zero), .pc_plus4,
    .branch_taken, .next(pc_seq)
  );

  // PCwC: handler on an exception, EPC on rfe, otherwise the datapath's next PC
  // (or, for jr, the register value)
  always_comb begin
    if (take)        pc_next = HANDLER_ADDR;
    else if (is_rfe) pc_next = epc;
    else if (ext.jr) pc_next = rs1val;
    else             pc_next = pc_seq;
  end

  assign exc_taken   = !rst && take;
  assign exc_cause   = cause;
  assign kernel_mode = kernel;

  // ---------------- design rules ----------------
  // An instruction that raises an exception changes nothing but the PC, cp0 and
  // the PSR, and at most one extended operation is decoded.
  a_exc_no_write: assert property (@(posedge clk) disable iff (rst)
                                   exc_taken |-> !rf_we && !dm_we);
  a_ext_onehot:   assert property (@(posedge clk) disable iff (rst) $onehot0(ext));

endmodule
