// Two-to-one multiplexer of W-bit words.
//
// y = sel ? in1 : in0, purely combinational. The datapath uses it for the
// write-register select (RegDst, 5 bits), the ALU B operand (ALUSrc), the
// register write data (MemtoReg) and the next PC (nPC_sel). The "0"/"1"
// input numbering is the one of the original datapath description; the
// module itself is a plain parameterised multiplexer.
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic         sel,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] y
);

  always_comb y = sel ? in1 : in0;

endmodule
