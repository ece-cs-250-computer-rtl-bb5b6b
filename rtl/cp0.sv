// cp0: the coprocessor-0 registers that hold exception state, and the processor
// status register (PSR). They are independent registers, not an array:
//   $8  bad address  address of the load or store that caused an address error
//   $12 mask         bit c set lets an exception with code c reach the handler
//   $13 cause        exception code of the last exception, in bits [6:2]
//   $14 EPC          PC of the instruction that was interrupted
//   PSR              one bit, 1 = privileged (kernel) mode
// Read port: raddr selects $8/$12/$13/$14 onto rdata (other numbers read 0), used
// by mfc0. Write port: we/waddr/wdata, used by mtc0 and, at an exception, to save
// the PC into EPC. exc (set PSR) loads the cause register, sets privileged mode
// and, with badaddr_we, loads the bad address register; rfe (restore) clears
// privileged mode. All updates happen on the rising clock edge. Reset puts the
// processor in privileged mode with every exception enabled and the other
// registers cleared. Register numbers follow MIPS; the reset values, the mask
// format and the single-bit PSR are this design's choices.
module cp0
  import mips_pkg::*;
#(
  parameter int unsigned XLEN = 32
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [4:0]      raddr,
  output logic [XLEN-1:0] rdata,
  input  logic            we,
  input  logic [4:0]      waddr,
  input  logic [XLEN-1:0] wdata,
  input  logic            exc,          // PSRs: exception taken this cycle
  input  exc_code_e       exc_cause,
  input  logic            badaddr_we,
  input  logic [XLEN-1:0] badaddr,
  input  logic            rfe,          // PSRr: return from exception
  output logic [XLEN-1:0] epc,
  output logic [XLEN-1:0] mask,
  output logic            kernel
);
  logic [XLEN-1:0] badvaddr_q, mask_q, cause_q, epc_q;
  logic            psr_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      badvaddr_q <= '0;
      mask_q     <= '1;
      cause_q    <= '0;
      epc_q      <= '0;
      psr_q      <= 1'b1;
    end else begin
      if (we) begin
        unique case (waddr)
          CR_BADVADDR: badvaddr_q <= wdata;
          CR_MASK:     mask_q     <= wdata;
          CR_CAUSE:    cause_q    <= wdata;
          CR_EPC:      epc_q      <= wdata;
          default: ;
        endcase
      end
      if (exc) begin
        cause_q <= XLEN'({exc_cause, 2'b00});
        psr_q   <= 1'b1;
        if (badaddr_we) badvaddr_q <= badaddr;
      end else if (rfe) begin
        psr_q <= 1'b0;
      end
    end
  end

  always_comb begin
    unique case (raddr)
      CR_BADVADDR: rdata = badvaddr_q;
      CR_MASK:     rdata = mask_q;
      CR_CAUSE:    rdata = cause_q;
      CR_EPC:      rdata = epc_q;
      default:     rdata = '0;
    endcase
  end

  assign epc    = epc_q;
  assign mask   = mask_q;
  assign kernel = psr_q;
endmodule
