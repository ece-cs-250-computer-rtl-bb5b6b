// tb_we_register: drives the register with random data and write enables and
// compares its output after every clock edge with a model value kept in the
// testbench: reset gives RESET_VAL, WE high loads D, WE low holds.
module tb_we_register;
  localparam int unsigned N = 32;
  localparam logic [N-1:0] RV = 32'h0040_0000;
  logic clk = 1'b0, rst, we;
  logic [N-1:0] d, q, model;
  int checks = 0, failures = 0;

  we_register #(.N(N), .RESET_VAL(RV)) dut (.clk, .rst, .we, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; d = '0;
    @(posedge clk); #1;
    checks++; if (q !== RV) begin failures++; $display("reset value %h", q); end
    model = RV;
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      we = ($urandom % 2) == 1;
      d  = $urandom;
      if (i % 97 == 50) rst = 1'b1; else rst = 1'b0;
      @(posedge clk); #1;
      if (rst) model = RV; else if (we) model = d;
      checks++;
      if (q !== model) begin failures++; $display("step %0d: q=%h expected %h", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
