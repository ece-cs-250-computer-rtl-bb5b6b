// tb_next_pc: random PCs, immediates and control values; the expected next PC is
// worked out in the testbench from the instruction-set rules: PC+4, PC+4 plus four
// times the signed branch offset when branching on a zero ALU result, or the jump
// target made of the top four bits of PC+4 and four times the 26-bit immediate.
module tb_next_pc;
  logic [31:0] pc, imm_sx, next, pc_plus4;
  logic [25:0] jimm;
  logic br, jp, zero, branch_taken;
  int checks = 0, failures = 0;

  next_pc dut (.pc, .imm_sx, .jimm, .br, .jp, .zero, .pc_plus4, .branch_taken, .next);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_n;
    longint off;
    for (int i = 0; i < 5000; i++) begin
      pc = $urandom & ~32'h3;
      if (i % 5 == 0) pc = 32'hFFFF_FFFC;
      imm_sx = 32'($signed(16'($urandom)));
      jimm = 26'($urandom);
      br = ($urandom % 2) == 1; jp = ($urandom % 4) == 0; zero = ($urandom % 2) == 1;
      #1;
      off = longint'($signed(imm_sx)) * 4;
      if (jp)              exp_n = {32'(pc + 4) >> 28, jimm, 2'b00};
      else if (br && zero) exp_n = 32'(longint'(pc) + 4 + off);
      else                 exp_n = pc + 4;
      checks += 3;
      if (pc_plus4 !== pc + 32'd4) begin failures++; $display("pc_plus4 wrong"); end
      if (next !== exp_n) begin failures++; $display("pc %h imm %h j %h br%b jp%b z%b: next %h exp %h", pc, imm_sx, jimm, br, jp, zero, next, exp_n); end
      if (branch_taken !== (br && zero)) begin failures++; $display("branch_taken wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
