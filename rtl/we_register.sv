// we_register: an N-bit register, a row of D flip-flops that share one clock and
// one write enable. On a rising clock edge with WE high the register loads D; with
// WE low it keeps its value. Q always shows the stored value. The processor uses
// it as the program counter with WE tied high, which makes it load every cycle.
// The shared clock and write enable follow the original register; the synchronous
// reset to RESET_VAL is this design's choice, so that the PC starts at a known
// address. The enable is written as a clock-enable rather than a gated clock.
module we_register #(
  parameter int unsigned       N         = 32,
  parameter logic [N-1:0]      RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,   // synchronous, active high
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VAL;
    else if (we) q <= d;
  end
endmodule
