// regfile: the architectural register file, NREGS registers of XLEN bits with
// two read ports and one write port (the most an R-type instruction needs).
// A read port is an address (rs1, rs2) and a data bus (rs1val, rs2val); it is
// combinational, a multiplexer over all registers, the logic equivalent of the
// tri-state read drivers of the classic register file. The write port is an address (rd),
// data (rdval) and a write enable (we): a decoder on rd ANDed with we picks the one
// register that loads rdval on the rising clock edge. A read in the same cycle as a
// write to the same register returns the old value; the new value is visible from
// the next cycle. MIPS sizes (32 registers of 32 bits, 5-bit addresses) are the
// defaults. Register 0 always reads as zero and ignores writes when ZERO_REG is
// set, as in the MIPS ISA; the synchronous reset that clears every register is
// this design's choice.
module regfile #(
  parameter int unsigned XLEN     = 32,
  parameter int unsigned NREGS    = 32,
  parameter bit          ZERO_REG = 1'b1,
  localparam int unsigned AW      = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            we,
  input  logic [AW-1:0]   rd,
  input  logic [XLEN-1:0] rdval,
  input  logic [AW-1:0]   rs1,
  input  logic [AW-1:0]   rs2,
  output logic [XLEN-1:0] rs1val,
  output logic [XLEN-1:0] rs2val
);
  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && !(ZERO_REG && rd == '0)) begin
      regs[rd] <= rdval;
    end
  end

  always_comb begin
    rs1val = (ZERO_REG && rs1 == '0) ? '0 : regs[rs1];
    rs2val = (ZERO_REG && rs2 == '0) ? '0 : regs[rs2];
  end
endmodule
