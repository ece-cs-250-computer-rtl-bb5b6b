// cpu_tester: stimulus, reference model and scoreboard for the single-cycle
// processor, shared by the end-to-end testbenches. It generates random programs
// (all instruction classes, including ones that overflow, access unaligned
// addresses, change the exception mask, enter user mode with rfe, and illegal
// ones) and random data, loads both through the processor's load port while reset
// is held, then runs the processor. A second, instruction-level model of the same
// machine, written here from the instruction-set rules, executes each instruction
// in step with the processor; every cycle the processor's PC, register write, data
// memory write, exception and privilege mode are compared with the model. Since
// the model retires exactly one instruction per cycle, these checks also check a
// CPI of 1. Coverage counters record how often each mechanism occurred; one that
// never occurred counts as a failure. It raises done when it has finished (or
// when its watchdog expires); the testbench then reports and ends the simulation.
module cpu_tester
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS   = 1024,
  parameter int unsigned DMEM_WORDS   = 1024,
  parameter logic [31:0] RESET_PC     = 32'h0000_0000,
  parameter logic [31:0] HANDLER_ADDR = 32'h8000_0080,
  parameter bit          EXTENDED     = 1'b0,
  parameter int unsigned PROGRAMS     = 16,
  parameter int unsigned CYCLES       = 2000
) (
  output logic        clk,
  output logic        rst,
  output logic        load_we,
  output logic        load_dmem,
  output logic [31:0] load_addr,
  output logic [31:0] load_data,
  input  logic [31:0] pc,
  input  logic [31:0] insn,
  input  logic        rf_we,
  input  logic [4:0]  rf_waddr,
  input  logic [31:0] rf_wdata,
  input  logic        dm_we,
  input  logic [31:0] dm_addr,
  input  logic [31:0] dm_wdata,
  input  logic        branch_taken,
  input  logic        exc_taken,
  input  exc_code_e   exc_cause,
  input  logic        kernel_mode,
  output logic        done
);
  localparam int unsigned IIW = $clog2(IMEM_WORDS);
  localparam int unsigned DIW = $clog2(DMEM_WORDS);

  int checks = 0, failures = 0;

  initial done = 1'b0;

  // ---------------- reference machine state ----------------
  logic [31:0] m_r [32];
  logic [31:0] m_im [IMEM_WORDS];
  logic [31:0] m_dm [DMEM_WORDS];
  logic [31:0] m_pc, m_bad, m_mask, m_cause, m_epc;
  logic        m_k;

  // ---------------- coverage ----------------
  typedef enum int {
    EV_ADD, EV_ADDI, EV_LW, EV_SW, EV_BEQ_TAKEN, EV_BEQ_NOT, EV_J, EV_MFC0, EV_MTC0,
    EV_RFE, EV_EXC_OV, EV_EXC_ADEL, EV_EXC_ADES, EV_EXC_SYS, EV_EXC_RI, EV_EXC_CPU,
    EV_MASKED, EV_USER_CYCLE, EV_WRITE_R0,
    EV_SLL, EV_SLT_ONE, EV_SLT_ZERO, EV_JAL, EV_JR, EV_NUM
  } ev_e;
  int ev [EV_NUM];

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    // generous bound: loading plus running every program
    repeat (PROGRAMS * (CYCLES + IMEM_WORDS + DMEM_WORDS + 20) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    done = 1'b1;
  end

  // ---------------- program generation ----------------
  function automatic logic [4:0] rreg();
    int p = int'($urandom % 16);
    if (p < 2) return 5'd0;
    if (p == 2) return 5'd26;
    return 5'(1 + $urandom % 7);
  endfunction

  function automatic logic [31:0] gen_insn(input int idx);
    int k = int'($urandom % 100);
    logic [4:0] a = rreg(), b = rreg(), d = rreg();
    logic [15:0] imm;
    if (EXTENDED && ($urandom % 10) == 0) begin
      case ($urandom % 5)
        0: return {OP_RTYPE, 5'd0, b, d, 5'($urandom), FN_SLL};
        1, 2: return {OP_RTYPE, a, b, d, 5'd0, FN_SLT};
        3: begin
          int t;
          do t = int'($urandom % IMEM_WORDS); while (t == idx);
          return {OP_JAL, 26'(t)};
        end
        default: return {OP_RTYPE, (($urandom % 4) != 0) ? 5'd31 : a, 15'd0, FN_JR};
      endcase
    end
    if (k < 18) return {OP_RTYPE, a, b, d, 5'd0, FN_ADD};
    if (k < 32) return {OP_ADDI, a, b, 16'($signed(int'($urandom % 4096)) - 2048)};
    if (k < 50 || k >= 98) begin
      // word offsets from $0 mostly, sometimes from a register; 1 in 8 unaligned
      imm = 16'((($urandom % DMEM_WORDS) * 4) + ((($urandom % 8) == 0) ? 1 + $urandom % 3 : 0));
      if (($urandom % 4) != 0) a = 5'd0;
      return {(k < 41 || k >= 98) ? OP_LW : OP_SW, a, b, imm};
    end
    if (k < 62) begin
      int off;
      // mostly forward, so that random programs seldom spin in a loop
      if (($urandom % 6) == 0) off = -2 - int'($urandom % 6);
      else off = int'($urandom % 9);
      if (($urandom % 3) == 0) b = a;
      return {OP_BEQ, a, b, 16'(off)};
    end
    if (k < 67) begin
      int t;
      do t = int'($urandom % IMEM_WORDS); while (t == idx);
      return {OP_J, 26'(t)};
    end
    if (k < 73) begin
      logic [4:0] cr;
      case ($urandom % 4) 0: cr = 5'd8; 1: cr = 5'd12; 2: cr = 5'd13; default: cr = 5'd14; endcase
      return {OP_COP0, COP_MF, b, cr, 11'd0};
    end
    if (k < 79) begin
      logic [4:0] cr;
      case ($urandom % 4) 0: cr = 5'd8; 1: cr = 5'd12; 2: cr = 5'd13; default: cr = 5'd14; endcase
      return {OP_COP0, COP_MT, b, cr, 11'd0};
    end
    if (k < 83) return {OP_COP0, COP_CO, 15'd0, FN_RFE};
    if (k < 88) return {OP_RTYPE, 20'($urandom), FN_SYSCALL};
    if (k < 91) begin
      logic [5:0] fn;
      do fn = 6'($urandom); while (fn == FN_ADD || fn == FN_SYSCALL);
      return {OP_RTYPE, 20'($urandom), fn};
    end
    begin
      logic [5:0] op;
      do op = 6'($urandom);
      while (op inside {OP_RTYPE, OP_J, OP_BEQ, OP_ADDI, OP_COP0, OP_LW, OP_SW});
      return {op, 26'($urandom)};
    end
  endfunction

  // ---------------- reference model ----------------
  function automatic logic [31:0] cr_read(input logic [4:0] a);
    case (a)
      CR_BADVADDR: return m_bad;
      CR_MASK:     return m_mask;
      CR_CAUSE:    return m_cause;
      CR_EPC:      return m_epc;
      default:     return '0;
    endcase
  endfunction

  task automatic step_and_check();
    logic [31:0] ir, imm, sum, addr, next;
    logic [5:0]  op, fn;
    logic [4:0]  rs, rt, rd;
    logic        known, cop, priv, ov, unal;
    int          code;
    logic        e_rf_we, e_dm_we, e_exc, e_br;
    logic [4:0]  e_waddr;
    logic [31:0] e_wdata, e_daddr, e_dwdata;

    ir  = m_im[m_pc[IIW+1:2]];
    op  = ir[31:26]; rs = ir[25:21]; rt = ir[20:16]; rd = ir[15:11]; fn = ir[5:0];
    imm = {{16{ir[15]}}, ir[15:0]};
    next = m_pc + 4;
    e_rf_we = 0; e_dm_we = 0; e_exc = 0; e_br = 0; e_waddr = 0; e_wdata = 0; e_daddr = 0; e_dwdata = 0;

    cop   = (op == 6'h10) && (rs == 5'h00 || rs == 5'h04 || (rs == 5'h10 && fn == 6'h10));
    known = (op == 6'h00 && (fn == 6'h20 || fn == 6'h0C)) ||
            (EXTENDED && ((op == 6'h00 && fn inside {6'h00, 6'h2A, 6'h08}) || op == 6'h03)) ||
            (op inside {6'h02, 6'h04, 6'h08, 6'h23, 6'h2B}) || cop;
    priv  = cop && !m_k;
    sum   = (op == 6'h00) ? m_r[rs] + m_r[rt] : m_r[rs] + imm;
    ov    = (op == 6'h00 && fn == 6'h20) || op == 6'h08 ?
            (longint'($signed(m_r[rs])) + ((op == 6'h00) ? longint'($signed(m_r[rt])) : longint'($signed(imm))))
              != longint'($signed(sum)) : 1'b0;
    addr  = m_r[rs] + imm;
    unal  = (op == 6'h23 || op == 6'h2B) && addr[1:0] != 2'b00;

    if (!known)                          code = 10;
    else if (priv)                       code = 11;
    else if (op == 6'h00 && fn == 6'h0C) code = 8;
    else if (ov)                         code = 12;
    else if (unal && op == 6'h23)        code = 4;
    else if (unal)                       code = 5;
    else                                 code = 0;

    if (code != 0 && !m_mask[code]) ev[EV_MASKED]++;
    if (!m_k) ev[EV_USER_CYCLE]++;

    if (code != 0 && m_mask[code]) begin
      e_exc = 1;
      case (code)
        4: ev[EV_EXC_ADEL]++; 5: ev[EV_EXC_ADES]++; 8: ev[EV_EXC_SYS]++;
        10: ev[EV_EXC_RI]++; 11: ev[EV_EXC_CPU]++; default: ev[EV_EXC_OV]++;
      endcase
    end else begin
      case (op)
        6'h00: if (fn == 6'h20) begin
                 e_rf_we = 1; e_waddr = rd; e_wdata = sum; ev[EV_ADD]++;
               end else if (EXTENDED && fn == 6'h00) begin
                 e_rf_we = 1; e_waddr = rd; e_wdata = m_r[rt] << ir[10:6]; ev[EV_SLL]++;
               end else if (EXTENDED && fn == 6'h2A) begin
                 e_rf_we = 1; e_waddr = rd;
                 e_wdata = ($signed(m_r[rs]) < $signed(m_r[rt])) ? 32'd1 : 32'd0;
                 if (e_wdata[0]) ev[EV_SLT_ONE]++; else ev[EV_SLT_ZERO]++;
               end else if (EXTENDED && fn == 6'h08) begin
                 next = m_r[rs]; ev[EV_JR]++;
               end
        6'h03: begin
                 e_rf_we = 1; e_waddr = 5'd31; e_wdata = m_pc + 4;
                 next = {next[31:28], ir[25:0], 2'b00}; ev[EV_JAL]++;
               end
        6'h08: begin e_rf_we = 1; e_waddr = rt; e_wdata = sum; ev[EV_ADDI]++; end
        6'h23: begin e_rf_we = 1; e_waddr = rt; e_wdata = m_dm[addr[DIW+1:2]]; ev[EV_LW]++; end
        6'h2B: begin e_dm_we = 1; e_daddr = addr; e_dwdata = m_r[rt]; ev[EV_SW]++; end
        6'h04: if (m_r[rs] == m_r[rt]) begin
                 next = m_pc + 4 + (imm << 2); e_br = 1; ev[EV_BEQ_TAKEN]++;
               end
               else ev[EV_BEQ_NOT]++;
        6'h02: begin next = {next[31:28], ir[25:0], 2'b00}; ev[EV_J]++; end
        6'h10: if (m_k) begin
                 if (rs == 5'h00) begin e_rf_we = 1; e_waddr = rt; e_wdata = cr_read(rd); ev[EV_MFC0]++; end
                 else if (rs == 5'h04) ev[EV_MTC0]++;
                 else begin next = m_epc; ev[EV_RFE]++; end
               end
        default: ;
      endcase
    end
    if (e_rf_we && e_waddr == 0) ev[EV_WRITE_R0]++;

    // compare with the processor
    checks++;
    if (pc !== m_pc || insn !== ir) begin
      failures++;
      $display("pc %h insn %h, expected pc %h insn %h", pc, insn, m_pc, ir);
    end
    checks++;
    if (rf_we !== e_rf_we || (e_rf_we && (rf_waddr !== e_waddr || rf_wdata !== e_wdata))) begin
      failures++;
      $display("pc %h insn %h: reg write %b r%0d=%h, expected %b r%0d=%h", m_pc, ir,
               rf_we, rf_waddr, rf_wdata, e_rf_we, e_waddr, e_wdata);
    end
    checks++;
    if (dm_we !== e_dm_we || (e_dm_we && (dm_addr[DIW+1:2] !== e_daddr[DIW+1:2] || dm_wdata !== e_dwdata))) begin
      failures++;
      $display("pc %h insn %h: mem write %b [%h]=%h, expected %b [%h]=%h", m_pc, ir,
               dm_we, dm_addr, dm_wdata, e_dm_we, e_daddr, e_dwdata);
    end
    checks++;
    if (exc_taken !== e_exc || (e_exc && int'(exc_cause) != code) || kernel_mode !== m_k) begin
      failures++;
      $display("pc %h insn %h: exception %b cause %0d kernel %b, expected %b cause %0d kernel %b",
               m_pc, ir, exc_taken, exc_cause, kernel_mode, e_exc, code, m_k);
    end
    checks++;
    if (branch_taken !== e_br) begin
      failures++;
      $display("pc %h insn %h: branch taken %b, expected %b", m_pc, ir, branch_taken, e_br);
    end

    // commit the reference state
    if (e_exc) begin
      m_epc   = m_pc;
      m_cause = 32'(code) << 2;
      if (code == 4 || code == 5) m_bad = addr;
      m_k     = 1'b1;
      next    = HANDLER_ADDR;
    end else begin
      if (e_rf_we && e_waddr != 0) m_r[e_waddr] = e_wdata;
      if (e_dm_we) m_dm[e_daddr[DIW+1:2]] = e_dwdata;
      if (op == 6'h10 && m_k && rs == 5'h04) begin
        case (rd)
          CR_BADVADDR: m_bad = m_r[rt]; CR_MASK: m_mask = m_r[rt];
          CR_CAUSE: m_cause = m_r[rt]; CR_EPC: m_epc = m_r[rt]; default: ;
        endcase
      end
      if (op == 6'h10 && m_k && rs == 5'h10) m_k = 1'b0;
    end
    m_pc = next;
  endtask

  // ---------------- main sequence ----------------
  initial begin
    int hidx;
    int cycles_run = 0, insns_run = 0;
    hidx = int'(HANDLER_ADDR[IIW+1:2]);
    rst = 1'b1; load_we = 1'b0; load_dmem = 1'b0; load_addr = '0; load_data = '0;
    for (int p = 0; p < PROGRAMS; p++) begin
      rst = 1'b1;
      for (int i = 0; i < IMEM_WORDS; i++) m_im[i] = gen_insn(i);
      // exception handler: return to the instruction after the one that trapped,
      // and on some programs enable only some exceptions
      m_im[hidx]     = {OP_COP0, COP_MF, 5'd26, CR_EPC, 11'd0};
      m_im[(hidx + 1) % IMEM_WORDS] = {OP_ADDI, 5'd26, 5'd26, 16'd4};
      m_im[(hidx + 2) % IMEM_WORDS] = {OP_COP0, COP_MT, 5'd26, CR_EPC, 11'd0};
      m_im[(hidx + 3) % IMEM_WORDS] = {OP_COP0, COP_CO, 15'd0, FN_RFE};
      // prologue: on odd programs load a random exception mask into $12
      if (p % 2 == 1) begin
        m_im[0] = {OP_ADDI, 5'd0, 5'd1, 16'($urandom)};
        m_im[1] = {OP_COP0, COP_MT, 5'd1, CR_MASK, 11'd0};
      end
      for (int i = 0; i < DMEM_WORDS; i++) begin
        case ($urandom % 4)
          0: m_dm[i] = 32'(i * 4);
          1: m_dm[i] = 32'h7FFF_FF00 + ($urandom % 512);
          2: m_dm[i] = 32'(($urandom % 2) == 1 ? -($urandom % 64) : ($urandom % 64));
          default: m_dm[i] = $urandom;
        endcase
      end
      for (int i = 0; i < IMEM_WORDS; i++) begin
        load_we = 1'b1; load_dmem = 1'b0; load_addr = 32'(i * 4); load_data = m_im[i];
        @(posedge clk); #1;
      end
      for (int i = 0; i < DMEM_WORDS; i++) begin
        load_we = 1'b1; load_dmem = 1'b1; load_addr = 32'(i * 4); load_data = m_dm[i];
        @(posedge clk); #1;
      end
      load_we = 1'b0;
      @(posedge clk); #1;
      rst = 1'b0;
      for (int r = 0; r < 32; r++) m_r[r] = '0;
      m_pc = RESET_PC; m_bad = '0; m_mask = '1; m_cause = '0; m_epc = '0; m_k = 1'b1;
      for (int c = 0; c < CYCLES; c++) begin
        #1;
        step_and_check();
        insns_run++;
        @(posedge clk); #1;
        cycles_run++;
      end
    end
    // one instruction retired per cycle
    checks++;
    if (insns_run != cycles_run) failures++;
    for (int e = 0; e < EV_NUM; e++) begin
      checks++;
      $display("%-14s %0d", ev_e'(e), ev[e]);
      if (ev[e] == 0 && (EXTENDED || e < int'(EV_SLL))) begin failures++; $display("mechanism %s never occurred", ev_e'(e)); end
    end
    $display("cycles %0d instructions %0d", cycles_run, insns_run);
    done = 1'b1;
  end
endmodule
