// tb_regfile: random writes and reads of the 32 x 32 register file against a
// model array. Checks that both read ports return the model value, that register
// 0 reads zero after writes to it, that reset clears every register and that a
// read in the cycle of a write still returns the old value.
module tb_regfile;
  logic clk = 1'b0, rst, we;
  logic [4:0] rd, rs1, rs2;
  logic [31:0] rdval, rs1val, rs2val;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .we, .rd, .rdval, .rs1, .rs2, .rs1val, .rs2val);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int r = 0; r < 32; r++) begin
      rs1 = 5'(r); rs2 = 5'(31 - r); #1;
      checks += 2;
      if (rs1val !== model[r]) begin failures++; $display("rs1 r%0d=%h exp %h", r, rs1val, model[r]); end
      if (rs2val !== model[31-r]) begin failures++; $display("rs2 r%0d=%h exp %h", 31-r, rs2val, model[31-r]); end
    end
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; rd = '0; rdval = '0; rs1 = '0; rs2 = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int r = 0; r < 32; r++) model[r] = '0;
    check_reads();
    for (int i = 0; i < 2000; i++) begin
      we = ($urandom % 4) != 0;
      rd = 5'($urandom);
      rdval = $urandom;
      rs1 = rd; rs2 = 5'($urandom);
      #1;
      // same-cycle read returns the old value
      checks++;
      if (rs1val !== model[rd]) begin failures++; $display("read-before-write r%0d=%h exp %h", rd, rs1val, model[rd]); end
      @(posedge clk); #1;
      if (we && rd != 0) model[rd] = rdval;
      checks += 2;
      if (rs1val !== model[rs1]) begin failures++; $display("after write r%0d=%h exp %h", rs1, rs1val, model[rs1]); end
      if (rs2val !== model[rs2]) begin failures++; $display("port2 r%0d=%h exp %h", rs2, rs2val, model[rs2]); end
    end
    we = 1'b0;
    check_reads();
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    for (int r = 0; r < 32; r++) model[r] = '0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
