// Shared types and constants of the single-cycle MIPS subset processor.
//
// The processor executes six instructions: addu, subu (R-format), ori, lw,
// sw and beq (I-format). The instruction field layout (op 31:26, rs 25:21,
// rt 20:16, rd 15:11, shamt 10:6, funct 5:0, imm16 15:0) follows the
// standard MIPS formats. The opcode and funct numbers are the standard MIPS
// encodings; the ALUctr encoding and the control bundle are this design's
// own choice.
package mips_pkg;

  // Standard MIPS opcodes (bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_ORI   = 6'h0d;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2b;
  localparam logic [5:0] OP_BEQ   = 6'h04;

  // Standard MIPS funct codes (bits 5:0) of the R-format
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUBU = 6'h23;

  // ALU operation select (ALUctr)
  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_OR  = 2'd2
  } alu_op_e;

  // Extender operation select (ExtOp)
  typedef enum logic {
    EXT_ZERO = 1'b0,
    EXT_SIGN = 1'b1
  } ext_op_e;

  // Instruction word split into its fields
  typedef struct packed {
    logic [5:0]  op;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  rd;
    logic [4:0]  shamt;
    logic [5:0]  funct;
  } rtype_t;

  // Control points of the datapath
  typedef struct packed {
    logic    npc_sel;    // 1: PC = PC + 4 + SignExt(imm16)*4
    logic    reg_wr;     // register file write enable
    logic    reg_dst;    // 1: write register is rd, 0: rt
    ext_op_e ext_op;     // zero or sign extension of imm16
    logic    alu_src;    // 1: ALU B input is the extended immediate
    alu_op_e alu_ctr;    // ALU operation
    logic    mem_wr;     // data memory write enable
    logic    mem_to_reg; // 1: register write data from data memory
  } ctrl_t;

endpackage
