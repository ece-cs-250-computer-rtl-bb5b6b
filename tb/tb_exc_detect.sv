// tb_exc_detect: builds random instructions of every class (add, addi, lw, sw,
// beq, j, syscall, mfc0, mtc0, rfe, other R-type functions, other opcodes), with
// random privilege mode, ALU overflow, address offset and exception mask. The
// control word is taken from the control table kept in the testbench. The expected
// outputs come from a per-class description of the exception rules in the
// testbench. Extended-subset instructions (sll, slt, jr, jal, flagged legal by
// ext_valid) must raise nothing and must not be killed. Counts that every cause is both taken and masked at least once.
module tb_exc_detect;
  import mips_pkg::*;
  logic [31:0] insn, mask;
  ctrl_t ctrl;
  logic ctrl_valid, ext_valid, kernel, alu_overflow;
  logic [1:0] addr_lo;
  logic is_mfc0, is_mtc0, is_rfe, take, addr_fault, kill;
  exc_code_e cause;
  int checks = 0, failures = 0;
  int taken_cnt [32];
  int masked_cnt [32];

  exc_detect dut (.insn, .ctrl, .ctrl_valid, .ext_valid, .kernel, .alu_overflow, .addr_lo, .mask,
                  .is_mfc0, .is_mtc0, .is_rfe, .take, .cause, .addr_fault, .kill);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {C_ADD, C_ADDI, C_LW, C_SW, C_BEQ, C_J, C_SYS, C_MF, C_MT, C_RFE,
                    C_BADFN, C_BADOP, C_EXT, C_NUM} cls_e;

  initial begin
    cls_e c;
    logic [5:0] op, fn;
    logic [4:0] rs;
    logic [7:0] row;
    exc_code_e e;          // cause the class raises before masking
    logic datapath_insn;   // executed by the datapath itself
    logic exp_take, exp_kill;
    for (int i = 0; i < 20000; i++) begin
      c = cls_e'($urandom % C_NUM);
      insn = $urandom;
      kernel = ($urandom % 2) == 1;
      alu_overflow = ($urandom % 3) == 0;
      addr_lo = 2'($urandom);
      if (($urandom % 2) == 1) addr_lo = 2'b00;
      mask = ($urandom % 3) == 0 ? $urandom : '1;
      op = 6'($urandom); fn = 6'($urandom); rs = insn[25:21];
      case (c)
        C_ADD:  begin op = 6'h00; fn = 6'h20; end
        C_ADDI: op = 6'h08;
        C_LW:   op = 6'h23;
        C_SW:   op = 6'h2B;
        C_BEQ:  op = 6'h04;
        C_J:    op = 6'h02;
        C_SYS:  begin op = 6'h00; fn = 6'h0C; end
        C_MF:   begin op = 6'h10; rs = 5'h00; end
        C_MT:   begin op = 6'h10; rs = 5'h04; end
        C_RFE:  begin op = 6'h10; rs = 5'h10; fn = 6'h10; end
        C_BADFN: begin op = 6'h00; while (fn == 6'h20 || fn == 6'h0C) fn = 6'($urandom); end
        C_EXT:  case ($urandom % 4)
                  0: begin op = 6'h00; fn = 6'h00; end
                  1: begin op = 6'h00; fn = 6'h2A; end
                  2: begin op = 6'h00; fn = 6'h08; end
                  default: op = 6'h03;
                endcase
        default: begin
          while (op inside {6'h00, 6'h02, 6'h04, 6'h08, 6'h10, 6'h23, 6'h2B}) op = 6'($urandom);
        end
      endcase
      if (c == C_J) insn = {op, insn[25:0]};
      else if (c inside {C_ADD, C_SYS, C_BADFN, C_RFE} || (c == C_EXT && op == 6'h00)) insn = {op, rs, insn[20:6], fn};
      else if (c == C_MF || c == C_MT) insn = {op, rs, insn[20:11], 11'b0};
      else insn = {op, insn[25:0]};
      // control table row for the opcode: BR JP ALUinB ALUop DMwe Rwe Rdst Rwd
      ctrl_valid = 1'b1;
      case (op)
        6'h00: row = 8'b0_0_0_0_0_1_1_0;
        6'h08: row = 8'b0_0_1_0_0_1_0_0;
        6'h23: row = 8'b0_0_1_0_0_1_0_1;
        6'h2B: row = 8'b0_0_1_0_1_0_0_0;
        6'h04: row = 8'b1_0_0_1_0_0_0_0;
        6'h02: row = 8'b0_1_0_0_0_0_0_0;
        default: begin row = 8'b0; ctrl_valid = 1'b0; end
      endcase
      ctrl = ctrl_t'(row);
      // the extended-subset decoder flags its own instructions as legal
      ext_valid = (c == C_EXT);
      #1;
      datapath_insn = c inside {C_ADD, C_ADDI, C_LW, C_SW, C_BEQ, C_J, C_EXT};
      case (c)
        C_ADD, C_ADDI:   e = alu_overflow ? EXC_OV : EXC_NONE;
        C_LW:            e = (addr_lo != 0) ? EXC_ADEL : EXC_NONE;
        C_SW:            e = (addr_lo != 0) ? EXC_ADES : EXC_NONE;
        C_SYS:           e = EXC_SYS;
        C_MF, C_MT, C_RFE: e = kernel ? EXC_NONE : EXC_CPU;
        C_BADFN, C_BADOP:  e = EXC_RI;
        default:         e = EXC_NONE;
      endcase
      exp_take = (e != EXC_NONE) && mask[int'(e)];
      exp_kill = exp_take || !datapath_insn;
      if (e != EXC_NONE) begin
        if (exp_take) taken_cnt[int'(e)]++; else masked_cnt[int'(e)]++;
      end
      checks += 7;
      if (take !== exp_take) begin failures++; $display("class %s take %b exp %b", c.name(), take, exp_take); end
      if (cause !== (exp_take ? e : EXC_NONE)) begin failures++; $display("class %s cause %0d exp %0d", c.name(), cause, e); end
      if (kill !== exp_kill) begin failures++; $display("class %s kill %b exp %b", c.name(), kill, exp_kill); end
      if (addr_fault !== (exp_take && (e == EXC_ADEL || e == EXC_ADES))) begin failures++; $display("addr_fault"); end
      if (is_mfc0 !== (c == C_MF && kernel)) begin failures++; $display("is_mfc0"); end
      if (is_mtc0 !== (c == C_MT && kernel)) begin failures++; $display("is_mtc0"); end
      if (is_rfe !== (c == C_RFE && kernel)) begin failures++; $display("is_rfe"); end
    end
    foreach (taken_cnt[k]) begin
      if (k inside {4, 5, 8, 10, 11, 12}) begin
        checks++;
        if (taken_cnt[k] == 0 || masked_cnt[k] == 0) begin
          failures++; $display("cause %0d taken %0d masked %0d", k, taken_cnt[k], masked_cnt[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
