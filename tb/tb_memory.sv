// tb_memory: writes random words at random word addresses of a 64-word memory,
// mixing in reads, and checks every read against a model array. The byte offset
// bits are randomised to show they do not change which word is accessed, and the
// read is checked in the same cycle as the address is applied (combinational).
module tb_memory;
  localparam int unsigned WORDS = 64;
  logic clk = 1'b0, we;
  logic [31:0] addr, wdata, rdata;
  logic [31:0] model [WORDS];
  bit          known [WORDS];
  int checks = 0, failures = 0;

  memory #(.WORDS(WORDS)) dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w;
    we = 1'b0; addr = '0; wdata = '0;
    // fill every word first
    for (int i = 0; i < WORDS; i++) begin
      we = 1'b1; addr = 32'(i * 4); wdata = $urandom;
      model[i] = wdata; known[i] = 1'b1;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      w = int'($urandom % WORDS);
      we = ($urandom % 3) == 0;
      addr = {24'($urandom), 8'(0)} & 32'h0000_0000 | 32'(w * 4) | 32'($urandom % 4);
      wdata = $urandom;
      #1;
      checks++;
      if (rdata !== model[w]) begin failures++; $display("read w%0d=%h exp %h", w, rdata, model[w]); end
      @(posedge clk); #1;
      if (we) model[w] = wdata;
      checks++;
      if (rdata !== model[w]) begin failures++; $display("after edge w%0d=%h exp %h", w, rdata, model[w]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
