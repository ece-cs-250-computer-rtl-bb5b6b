// tb_mips_cpu: end-to-end test of the processor at its default sizes (1024-word
// instruction and data memories, control ROM). cpu_tester loads random programs
// and data and checks every cycle against its instruction-level model.
module tb_mips_cpu;
  import mips_pkg::*;
  logic clk, rst, load_we, load_dmem;
  logic [31:0] load_addr, load_data, pc, insn, rf_wdata, dm_addr, dm_wdata;
  logic rf_we, dm_we, branch_taken, exc_taken, kernel_mode, done;
  logic [4:0] rf_waddr;
  exc_code_e exc_cause;

  mips_cpu dut (.*);
  cpu_tester tester (.*);

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", tester.checks, tester.failures);
    $finish;
  end
endmodule
