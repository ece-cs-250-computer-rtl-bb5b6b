// tb_control_logic: applies all 64 opcodes to the control unit and compares the
// control word with the control table of the simple datapath, held in the
// testbench as one row per instruction (don't-cares expected as 0). Opcodes not in
// the table must give valid = 0 and an all-zero control word.
module tb_control_logic;
  import mips_pkg::*;
  logic [5:0] opcode;
  ctrl_t ctrl;
  logic valid;
  int checks = 0, failures = 0;

  control_logic dut (.opcode, .ctrl, .valid);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // BR JP ALUinB ALUop DMwe Rwe Rdst Rwd, as printed in the table
  function automatic logic [7:0] table_row(input logic [5:0] op, output logic known);
    known = 1'b1;
    case (op)
      6'h00:   return 8'b0_0_0_0_0_1_1_0; // add
      6'h08:   return 8'b0_0_1_0_0_1_0_0; // addi
      6'h23:   return 8'b0_0_1_0_0_1_0_1; // lw
      6'h2B:   return 8'b0_0_1_0_1_0_0_0; // sw
      6'h04:   return 8'b1_0_0_1_0_0_0_0; // beq
      6'h02:   return 8'b0_1_0_0_0_0_0_0; // j
      default: begin known = 1'b0; return 8'b0; end
    endcase
  endfunction

  initial begin
    logic [7:0] exp_row, got;
    logic known;
    int seen = 0;
    for (int o = 0; o < 64; o++) begin
      opcode = 6'(o); #1;
      exp_row = table_row(6'(o), known);
      got = {ctrl.br, ctrl.jp, ctrl.alu_in_b, ctrl.alu_op, ctrl.dm_we, ctrl.r_we, ctrl.r_dst, ctrl.r_wd};
      checks += 2;
      if (got !== exp_row) begin failures++; $display("opcode %h: control %b expected %b", o, got, exp_row); end
      if (valid !== known) begin failures++; $display("opcode %h: valid %b expected %b", o, valid, known); end
      if (known) seen++;
    end
    checks++;
    if (seen != 6) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
