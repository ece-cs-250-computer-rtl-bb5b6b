// tb_cp0: exercises the coprocessor-0 registers: reset values (privileged mode,
// all exceptions enabled), writes and reads of $8/$12/$13/$14 through the
// register port, an exception (cause code stored in bits [6:2], bad address
// captured when asked, privileged mode set), return from exception (user mode)
// and reads of unimplemented register numbers (zero). A model in the testbench
// predicts every value.
module tb_cp0;
  import mips_pkg::*;
  logic clk = 1'b0, rst, we, exc, badaddr_we, rfe, kernel;
  logic [4:0] raddr, waddr;
  logic [31:0] rdata, wdata, badaddr, epc, mask;
  exc_code_e exc_cause;
  logic [31:0] m_bad, m_mask, m_cause, m_epc;
  logic m_k;
  int checks = 0, failures = 0;

  cp0 dut (.clk, .rst, .raddr, .rdata, .we, .waddr, .wdata, .exc, .exc_cause,
           .badaddr_we, .badaddr, .rfe, .epc, .mask, .kernel);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model_read(input logic [4:0] a);
    case (a)
      5'd8:  return m_bad;
      5'd12: return m_mask;
      5'd13: return m_cause;
      5'd14: return m_epc;
      default: return '0;
    endcase
  endfunction

  task automatic check_all();
    for (int a = 0; a < 32; a++) begin
      raddr = 5'(a); #1;
      checks++;
      if (rdata !== model_read(5'(a))) begin failures++; $display("cr%0d=%h exp %h", a, rdata, model_read(5'(a))); end
    end
    checks += 3;
    if (kernel !== m_k) begin failures++; $display("kernel %b exp %b", kernel, m_k); end
    if (epc !== m_epc) begin failures++; $display("epc out"); end
    if (mask !== m_mask) begin failures++; $display("mask out"); end
  endtask

  initial begin
    exc_code_e codes [6];
    codes = '{EXC_ADEL, EXC_ADES, EXC_SYS, EXC_RI, EXC_CPU, EXC_OV};
    rst = 1'b1; we = 0; exc = 0; rfe = 0; badaddr_we = 0; waddr = 0; wdata = 0;
    badaddr = 0; raddr = 0; exc_cause = EXC_NONE;
    @(posedge clk); #1; rst = 1'b0;
    m_bad = 0; m_mask = '1; m_cause = 0; m_epc = 0; m_k = 1;
    check_all();
    for (int i = 0; i < 400; i++) begin
      int kind;
      kind = int'($urandom % 3);
      we = 0; exc = 0; rfe = 0; badaddr_we = 0;
      waddr = 5'($urandom); wdata = $urandom; badaddr = $urandom;
      exc_cause = codes[$urandom % 6];
      if (kind == 0) begin
        we = 1;
        if (($urandom % 2) == 1) waddr = (($urandom % 2) == 1) ? 5'd8 : 5'(12 + $urandom % 3);
      end else if (kind == 1) begin
        exc = 1; we = 1; waddr = CR_EPC; badaddr_we = ($urandom % 2) == 1;
      end else begin
        rfe = 1;
      end
      @(posedge clk); #1;
      if (we) case (waddr)
        5'd8: m_bad = wdata; 5'd12: m_mask = wdata; 5'd13: m_cause = wdata; 5'd14: m_epc = wdata;
        default: ;
      endcase
      if (exc) begin
        m_cause = 32'(exc_cause) << 2; m_k = 1;
        if (badaddr_we) m_bad = badaddr;
      end else if (rfe) m_k = 0;
      we = 0; exc = 0; rfe = 0;
      check_all();
    end
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    m_bad = 0; m_mask = '1; m_cause = 0; m_epc = 0; m_k = 1;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
