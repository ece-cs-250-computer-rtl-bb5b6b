// memory: a one-port RAM of WORDS words of XLEN bits, used for both the
// instruction memory and the data memory. There is one address bus, a write data
// bus, a read data bus and a write enable: one access per cycle. The read is
// combinational (the word at addr appears on rdata in the same cycle); the write
// happens on the rising clock edge when we is high, so the single-cycle processor
// reads early in the cycle and writes at its end. The address is a byte address:
// bits [1:0] select a byte within the word and are ignored here (the processor
// traps unaligned word accesses), and only the low log2(WORDS) word-address bits
// are decoded, so addresses beyond the array wrap. The port set follows the
// original memory description; the sizes, the byte addressing and the
// combinational read are this design's choices. The array has no reset: it is loaded by writes.
module memory #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned WORDS = 1024,
  localparam int unsigned IW   = $clog2(WORDS)
) (
  input  logic            clk,
  input  logic            we,
  input  logic [XLEN-1:0] addr,
  input  logic [XLEN-1:0] wdata,
  output logic [XLEN-1:0] rdata
);
  logic [XLEN-1:0] mem [WORDS];
  logic [IW-1:0]   idx;

  assign idx   = addr[IW+1:2];
  assign rdata = mem[idx];

  always_ff @(posedge clk) begin
    if (we) mem[idx] <= wdata;
  end
endmodule
