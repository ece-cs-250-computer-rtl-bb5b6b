// tb_shifter: applies random words with every shift amount and checks the output
// against the word multiplied by two to the power of the shift amount (the
// arithmetic meaning of a logical left shift), truncated to 32 bits.
module tb_shifter;
  logic [31:0] in, out;
  logic [4:0] shamt;
  int checks = 0, failures = 0;

  shifter dut (.in, .shamt, .out);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] prod;
    for (int i = 0; i < 300; i++) begin
      for (int s = 0; s < 32; s++) begin
        in = (i == 0) ? 32'hFFFF_FFFF : $urandom;
        shamt = 5'(s); #1;
        prod = 64'(in) * (64'd1 << s);
        checks++;
        if (out !== prod[31:0]) begin
          failures++;
          if (failures < 10) $display("%h << %0d = %h, expected %h", in, s, out, prod[31:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
