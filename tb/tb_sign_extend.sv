// tb_sign_extend: applies every 16-bit input and checks that the 32-bit output
// has the same signed value.
module tb_sign_extend;
  logic [15:0] in;
  logic [31:0] out;
  int checks = 0, failures = 0;

  sign_extend dut (.in, .out);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      in = 16'(v); #1;
      checks++;
      if ($signed(out) != ((v >= 32768) ? v - 65536 : v)) begin
        failures++;
        if (failures < 10) $display("in %h out %h", in, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
