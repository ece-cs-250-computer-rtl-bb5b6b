// tb_alu: applies random and corner-case operands with both ALU operations and
// checks the result, the zero flag and the signed overflow flag against values
// computed in the testbench with 64-bit signed arithmetic.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] in1, in2, result;
  alu_op_e op;
  logic zero, overflow;
  int checks = 0, failures = 0;

  alu dut (.in1, .in2, .op, .result, .zero, .overflow);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] a, input logic [31:0] b, input alu_op_e o);
    longint sa, sb, full;
    logic [31:0] exp_r;
    logic exp_o;
    in1 = a; in2 = b; op = o; #1;
    sa = longint'($signed(a)); sb = longint'($signed(b));
    full  = (o == ALU_SUB) ? sa - sb : sa + sb;
    exp_r = full[31:0];
    exp_o = (full > 64'sd2147483647) || (full < -64'sd2147483648);
    checks++;
    if (result !== exp_r || zero !== (exp_r == 0) || overflow !== exp_o) begin
      failures++;
      $display("%h %s %h: got %h z%b o%b exp %h z%b o%b", a, o.name(), b,
               result, zero, overflow, exp_r, exp_r == 0, exp_o);
    end
  endtask

  initial begin
    logic [31:0] corner [6];
    corner = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000, 32'h1234_5678};
    foreach (corner[i]) foreach (corner[j]) begin
      check(corner[i], corner[j], ALU_ADD);
      check(corner[i], corner[j], ALU_SUB);
    end
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] a;
      a = $urandom;
      check(a, $urandom, ALU_ADD);
      check(a, $urandom, ALU_SUB);
      check(a, a, ALU_SUB);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
