// Main control of the single-cycle processor.
//
// Purely combinational: from the op and funct fields of the current
// instruction, and the Equal condition returned by the datapath, it sets
// every control point of the datapath for this one cycle:
//
//   instr  RegDst RegWr ExtOp ALUSrc ALUctr MemWr MemtoReg nPC_sel
//   addu   1(rd)  1     -     0      add    0     0        0
//   subu   1(rd)  1     -     0      sub    0     0        0
//   ori    0(rt)  1     zero  1      or     0     0        0
//   lw     0(rt)  1     sign  1      add    0     1        0
//   sw     -      0     sign  1      add    1     -        0
//   beq    -      0     -     0      sub    0     -        Equal
//
// Any other op/funct is executed as a no-operation: nothing is written and
// the PC advances by 4. The settings are derived from the register
// transfers of the six instructions; the opcode and funct numbers are the
// standard MIPS ones, and the no-operation treatment of unknown encodings
// is this design's choice. "-" entries are driven to 0.
module mips_control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  input  logic       equal,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '{npc_sel: 1'b0, reg_wr: 1'b0, reg_dst: 1'b0, ext_op: EXT_ZERO,
             alu_src: 1'b0, alu_ctr: ALU_ADD, mem_wr: 1'b0, mem_to_reg: 1'b0};
    unique case (op)
      OP_RTYPE: begin
        ctrl.reg_dst = 1'b1;
        if (funct == FN_ADDU) begin
          ctrl.reg_wr  = 1'b1;
          ctrl.alu_ctr = ALU_ADD;
        end else if (funct == FN_SUBU) begin
          ctrl.reg_wr  = 1'b1;
          ctrl.alu_ctr = ALU_SUB;
        end
      end
      OP_ORI: begin
        ctrl.reg_wr  = 1'b1;
        ctrl.ext_op  = EXT_ZERO;
        ctrl.alu_src = 1'b1;
        ctrl.alu_ctr = ALU_OR;
      end
      OP_LW: begin
        ctrl.reg_wr     = 1'b1;
        ctrl.ext_op     = EXT_SIGN;
        ctrl.alu_src    = 1'b1;
        ctrl.alu_ctr    = ALU_ADD;
        ctrl.mem_to_reg = 1'b1;
      end
      OP_SW: begin
        ctrl.ext_op  = EXT_SIGN;
        ctrl.alu_src = 1'b1;
        ctrl.alu_ctr = ALU_ADD;
        ctrl.mem_wr  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.alu_ctr = ALU_SUB;
        ctrl.npc_sel = equal;
      end
      default: ;
    endcase
  end

endmodule
