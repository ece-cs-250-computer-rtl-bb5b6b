// tb_ext_decode: applies every opcode with every function code to two decoders,
// one enabled and one disabled, and checks the one-hot outputs against the
// standard MIPS encodings of sll (R-type func 0x00), slt (0x2A), jr (0x08) and
// jal (opcode 0x03). The disabled decoder must never raise an output.
module tb_ext_decode;
  import mips_pkg::*;
  logic [5:0] opcode, funct;
  ext_t ext_on, ext_off;
  logic valid_on, valid_off;
  int checks = 0, failures = 0;

  ext_decode #(.ENABLE(1'b1)) dut_on  (.opcode, .funct, .ext(ext_on),  .valid(valid_on));
  ext_decode #(.ENABLE(1'b0)) dut_off (.opcode, .funct, .ext(ext_off), .valid(valid_off));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_e;  // sll slt jal jr
    for (int o = 0; o < 64; o++) begin
      for (int f = 0; f < 64; f++) begin
        opcode = 6'(o); funct = 6'(f); #1;
        exp_e = {o == 0 && f == 0, o == 0 && f == 'h2A, o == 3, o == 0 && f == 'h08};
        checks += 3;
        if ({ext_on.sll, ext_on.slt, ext_on.jal, ext_on.jr} !== exp_e) begin
          failures++; $display("op %h fn %h: %b expected %b", o, f, ext_on, exp_e);
        end
        if (valid_on !== (exp_e != 0)) begin failures++; $display("valid op %h fn %h", o, f); end
        if (ext_off !== '0 || valid_off !== 1'b0) begin failures++; $display("disabled decoder active"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
