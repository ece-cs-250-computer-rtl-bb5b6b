// tb_mips_cpu_logic: the end-to-end test of tb_mips_cpu run on the processor
// built with the decoder-and-gates control unit instead of the control ROM.
module tb_mips_cpu_logic;
  import mips_pkg::*;
  logic clk, rst, load_we, load_dmem;
  logic [31:0] load_addr, load_data, pc, insn, rf_wdata, dm_addr, dm_wdata;
  logic rf_we, dm_we, branch_taken, exc_taken, kernel_mode, done;
  logic [4:0] rf_waddr;
  exc_code_e exc_cause;

  mips_cpu #(.USE_CONTROL_ROM(1'b0)) dut (.*);
  cpu_tester tester (.*);

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", tester.checks, tester.failures);
    $finish;
  end
endmodule
