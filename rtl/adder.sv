// W-bit adder, carry out discarded (modulo 2^W).
//
// Combinational: sum = a + b. The next address logic uses two of them, one
// for PC + 4 and one for (PC + 4) + SignExt(imm16)*4. The adders follow the
// original datapath description; dropping the carry out is this design's choice.
module adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);

  always_comb sum = a + b;

endmodule
