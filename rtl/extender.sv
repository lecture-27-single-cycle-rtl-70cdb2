// Immediate extender: widens the 16-bit immediate to 32 bits.
//
// ExtOp selects zero extension (ori: R[rt] = R[rs] | ZeroExt(imm16)) or
// sign extension (lw/sw address offset: R[rs] + SignExt(imm16)).
// Combinational. The two modes follow the original datapath description; the encoding of ExtOp
// (0 = zero, 1 = sign) is this design's choice.
module extender
  import mips_pkg::*;
(
  input  ext_op_e     ext_op,
  input  logic [15:0] imm16,
  output logic [31:0] ext
);

  always_comb begin
    if (ext_op == EXT_SIGN) ext = {{16{imm16[15]}}, imm16};
    else                    ext = {16'h0000, imm16};
  end

endmodule
