// Next address logic of the instruction fetch unit.
//
// One adder forms PC + 4 (sequential code). "PC Ext" sign-extends imm16 and
// multiplies it by four (shift by two), and a second adder adds it to
// PC + 4 to form the branch target. The nPC_sel multiplexer chooses:
//   nPC_sel = 0: next = PC + 4
//   nPC_sel = 1: next = PC + 4 + SignExt(imm16) * 4
// Combinational. The structure (two adders, PC Ext, nPC_sel multiplexer)
// follows the original datapath description.
module next_pc (
  input  logic [31:0] pc,
  input  logic [15:0] imm16,
  input  logic        npc_sel,
  output logic [31:0] pc_plus4,
  output logic [31:0] next
);

  logic [31:0] pc_ext;
  logic [31:0] target;

  // PC Ext: sign extension and multiplication by four
  always_comb pc_ext = {{14{imm16[15]}}, imm16, 2'b00};

  adder #(.W(32)) u_add_seq (.a(pc),       .b(32'd4),  .sum(pc_plus4));
  adder #(.W(32)) u_add_br  (.a(pc_plus4), .b(pc_ext), .sum(target));

  mux2 #(.W(32)) u_mux (.sel(npc_sel), .in0(pc_plus4), .in1(target), .y(next));

endmodule
