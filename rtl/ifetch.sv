// Instruction fetch unit: program counter, next address logic and
// instruction memory.
//
// Each cycle the instruction memory returns mem[PC]; on the rising clock edge
// the PC register loads the next address, PC + 4 or the beq target chosen by
// nPC_sel. The PC register holds only bits 31:2; bits 1:0 are always 00, as
// instructions are word aligned. A synchronous active-high reset sets the PC
// to RESET_PC.
//
// Ports: clk, rst; npc_sel and imm16 from control and instruction; pc and
// instr out; the instruction memory load port (load_we, load_adr,
// load_data). Timing: the new PC is visible right after the clock edge and
// the instruction one memory access time later, in the same cycle.
//
// Follows the original datapath description: PC, next address logic, instruction memory, the 00 low
// PC bits. This design's choice: reset value and the load port.
module ifetch #(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        npc_sel,
  input  logic [15:0] imm16,
  output logic [31:0] pc,
  output logic [31:0] instr,
  input  logic        load_we,
  input  logic [31:0] load_adr,
  input  logic [31:0] load_data
);

  logic [29:0] pc_word;
  logic [31:0] pc_plus4;
  logic [31:0] pc_next;

  register #(.N(30), .RESET_VALUE(RESET_PC[31:2])) u_pc (
    .clk(clk), .rst(rst), .we(1'b1), .d(pc_next[31:2]), .q(pc_word)
  );

  always_comb pc = {pc_word, 2'b00};

  next_pc u_next (
    .pc(pc), .imm16(imm16), .npc_sel(npc_sel), .pc_plus4(pc_plus4), .next(pc_next)
  );

  imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk(clk), .adr(pc), .instr(instr),
    .load_we(load_we), .load_adr(load_adr), .load_data(load_data)
  );

endmodule
