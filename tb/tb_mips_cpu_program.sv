// tb_mips_cpu_program: runs one hand-assembled program on the processor at its
// default parameters and checks its results and its exact cycle count. The
// program adds up ten words of data with a loop built from the six basic
// instructions, stores the sum, then executes syscall; the exception handler
// reads EPC with mfc0 and stores it too. With one instruction per cycle the
// syscall must be executing in cycle 55 after reset (3 set-up instructions, ten
// loop passes of 5, the final beq and the sw), and the handler's store two cycles
// later.
module tb_mips_cpu_program;
  import mips_pkg::*;
  logic clk = 1'b0, rst, load_we, load_dmem;
  logic [31:0] load_addr, load_data, pc, insn, rf_wdata, dm_addr, dm_wdata;
  logic rf_we, dm_we, branch_taken, exc_taken, kernel_mode;
  logic [4:0] rf_waddr;
  exc_code_e exc_cause;
  int checks = 0, failures = 0;

  mips_cpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] r_type(input logic [4:0] rs, rt, rd, input logic [5:0] fn);
    return {OP_RTYPE, rs, rt, rd, 5'd0, fn};
  endfunction
  function automatic logic [31:0] i_type(input logic [5:0] op, input logic [4:0] rs, rt,
                                         input logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  logic [31:0] prog [64];
  logic [31:0] data [10];

  task automatic load(input logic dmem, input logic [31:0] addr, input logic [31:0] value);
    load_we = 1'b1; load_dmem = dmem; load_addr = addr; load_data = value;
    @(posedge clk); #1;
    load_we = 1'b0;
  endtask

  initial begin
    logic [31:0] sum;
    int cycle, sys_cycle, sum_cycle, epc_cycle, taken;
    logic [31:0] got_sum, got_epc;
    sys_cycle = -1; sum_cycle = -1; epc_cycle = -1; taken = 0;
    for (int i = 0; i < 64; i++) prog[i] = {OP_J, 26'(i)};  // unused words spin
    prog[0]  = i_type(OP_ADDI, 5'd0, 5'd1, 16'd0);        // $1 = 0      sum
    prog[1]  = i_type(OP_ADDI, 5'd0, 5'd2, 16'd0);        // $2 = 0      byte offset
    prog[2]  = i_type(OP_ADDI, 5'd0, 5'd3, 16'd40);       // $3 = 40     end offset
    prog[3]  = i_type(OP_BEQ,  5'd2, 5'd3, 16'd7);        // loop: beq $2,$3,done
    prog[4]  = i_type(OP_LW,   5'd2, 5'd4, 16'h0100);     // lw $4, 0x100($2)
    prog[5]  = r_type(5'd1, 5'd4, 5'd1, FN_ADD);          // add $1,$1,$4
    prog[6]  = i_type(OP_ADDI, 5'd2, 5'd2, 16'd4);        // addi $2,$2,4
    prog[7]  = {OP_J, 26'd3};                             // j loop
    prog[11] = i_type(OP_SW,   5'd0, 5'd1, 16'h0200);     // done: sw $1, 0x200($0)
    prog[12] = r_type(5'd0, 5'd0, 5'd0, FN_SYSCALL);      // syscall
    prog[32] = {OP_COP0, COP_MF, 5'd5, CR_EPC, 11'd0};    // handler: mfc0 $5, EPC
    prog[33] = i_type(OP_SW,   5'd0, 5'd5, 16'h0204);     // sw $5, 0x204($0)
    prog[34] = {OP_J, 26'd34};                            // spin
    sum = 0;
    for (int i = 0; i < 10; i++) begin
      data[i] = $urandom % 100000;
      sum += data[i];
    end

    rst = 1'b1; load_we = 1'b0; load_dmem = 1'b0; load_addr = '0; load_data = '0;
    for (int i = 0; i < 64; i++) load(1'b0, 32'(i * 4), prog[i]);
    for (int i = 0; i < 10; i++) load(1'b1, 32'h100 + 32'(i * 4), data[i]);
    @(posedge clk); #1;
    rst = 1'b0;

    for (cycle = 0; cycle < 80; cycle++) begin
      #1;
      if (branch_taken) taken++;
      if (exc_taken && sys_cycle < 0) begin
        sys_cycle = cycle;
        checks += 2;
        if (exc_cause != EXC_SYS) begin failures++; $display("cause %0d", exc_cause); end
        if (pc != 32'd48) begin failures++; $display("syscall at pc %h", pc); end
      end
      if (dm_we && dm_addr == 32'h200) begin sum_cycle = cycle; got_sum = dm_wdata; end
      if (dm_we && dm_addr == 32'h204) begin epc_cycle = cycle; got_epc = dm_wdata; end
      @(posedge clk); #1;
    end

    checks += 7;
    if (got_sum !== sum) begin failures++; $display("sum %0d expected %0d", got_sum, sum); end
    if (got_epc !== 32'd48) begin failures++; $display("EPC %h expected 48", got_epc); end
    if (sum_cycle != 54) begin failures++; $display("sw in cycle %0d, expected 54", sum_cycle); end
    if (sys_cycle != 55) begin failures++; $display("syscall in cycle %0d, expected 55", sys_cycle); end
    if (epc_cycle != 57) begin failures++; $display("handler store in cycle %0d, expected 57", epc_cycle); end
    if (taken != 1) begin failures++; $display("%0d taken branches, expected 1", taken); end
    if (!kernel_mode) begin failures++; $display("not in privileged mode after the exception"); end
    $display("sum %0d stored in cycle %0d, syscall in cycle %0d", got_sum, sum_cycle, sys_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
