// 32-bit ALU of the single-cycle datapath.
//
// ALUctr selects add (addu, lw and sw address), subtract (subu) or bitwise
// or (ori). The Equal output is asserted when the two operands are equal and
// is the branch condition of beq (Equal = R[rs] == R[rt]); it is computed
// for every operation, independently of ALUctr. Purely combinational, no
// overflow detection (the unsigned MIPS arithmetic ignores overflow).
// The operations and the Equal flag follow the original datapath description; the ALUctr encoding
// is this design's own.
module alu
  import mips_pkg::*;
(
  input  alu_op_e     alu_ctr,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] result,
  output logic        equal
);

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
    equal = (a == b);
  end

endmodule
