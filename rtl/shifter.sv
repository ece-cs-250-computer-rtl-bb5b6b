// shifter: logical left shift of a word by 0 to XLEN-1 places, the unit the sll
// instruction adds to the datapath. It is built as a barrel shifter: one stage per
// bit of the shift amount, stage k shifting by 2**k places or passing the word
// unchanged, with zeros entering from the right. Combinational, log2(XLEN) levels
// of two-input multiplexers.
module shifter #(
  parameter int unsigned XLEN = 32,
  localparam int unsigned SW  = $clog2(XLEN)
) (
  input  logic [XLEN-1:0] in,
  input  logic [SW-1:0]   shamt,
  output logic [XLEN-1:0] out
);
  logic [XLEN-1:0] stage [SW+1];

  always_comb begin
    stage[0] = in;
    for (int k = 0; k < SW; k++) begin
      stage[k+1] = shamt[k] ? (stage[k] << (1 << k)) : stage[k];
    end
    out = stage[SW];
  end
endmodule
