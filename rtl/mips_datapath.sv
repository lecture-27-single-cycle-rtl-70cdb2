// Single-cycle datapath for addu, subu, ori, lw, sw and beq.
//
// Every instruction completes in one clock cycle. During the cycle the
// instruction word is fetched at the PC, its rs and rt fields read two
// registers onto busA and busB, the extender widens imm16, the ALU works on
// busA and either busB or the extended immediate (ALUSrc), the data memory
// is read at the ALU result, and the MemtoReg multiplexer chooses the ALU
// result or the memory word as busW. On the rising edge that ends the cycle
// the register file (register rd or rt, by RegDst), the data memory (sw) and
// the PC all update at once.
//
//   addu/subu: R[rd] = R[rs] op R[rt]
//   ori:       R[rt] = R[rs] | ZeroExt(imm16)
//   lw:        R[rt] = Mem[R[rs] + SignExt(imm16)]
//   sw:        Mem[R[rs] + SignExt(imm16)] = R[rt]
//   beq:       if (R[rs] == R[rt]) PC = PC + 4 + SignExt(imm16)*4
//
// Ports: the control bundle in; the instruction word and the Equal
// condition out to the control; PC, the data memory write signals and the
// instruction memory load port for observation and program loading.
// The structure and the multiplexer input numbering follow the original
// single-cycle datapath description; widths of the load and observation ports are this
// design's choice.
module mips_datapath
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  output logic [31:0] instr,
  output logic        equal,
  output logic [31:0] pc,
  input  logic        dmp,
  output logic        dmem_we,
  output logic [31:0] dmem_adr,
  output logic [31:0] dmem_wdata,
  input  logic        load_we,
  input  logic [31:0] load_adr,
  input  logic [31:0] load_data
);

  rtype_t      f;
  logic [4:0]  rw;
  logic [31:0] bus_a, bus_b, bus_w;
  logic [31:0] ext_imm, alu_b, alu_result, mem_out;

  always_comb f = rtype_t'(instr);

  ifetch #(.IMEM_DEPTH(IMEM_DEPTH)) u_ifetch (
    .clk(clk), .rst(rst), .npc_sel(ctrl.npc_sel), .imm16(instr[15:0]),
    .pc(pc), .instr(instr),
    .load_we(load_we), .load_adr(load_adr), .load_data(load_data)
  );

  // RegDst: 1 selects rd, 0 selects rt
  mux2 #(.W(5)) u_mux_regdst (.sel(ctrl.reg_dst), .in0(f.rt), .in1(f.rd), .y(rw));

  regfile u_rf (
    .clk(clk), .we(ctrl.reg_wr), .dmp(dmp), .rw(rw), .bus_w(bus_w),
    .ra(f.rs), .bus_a(bus_a), .rb(f.rt), .bus_b(bus_b)
  );

  extender u_ext (.ext_op(ctrl.ext_op), .imm16(instr[15:0]), .ext(ext_imm));

  // ALUSrc: 0 selects busB, 1 the extended immediate
  mux2 #(.W(32)) u_mux_alusrc (.sel(ctrl.alu_src), .in0(bus_b), .in1(ext_imm), .y(alu_b));

  alu u_alu (.alu_ctr(ctrl.alu_ctr), .a(bus_a), .b(alu_b), .result(alu_result), .equal(equal));

  dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk(clk), .wr_en(ctrl.mem_wr), .adr(alu_result), .data_in(bus_b), .data_out(mem_out)
  );

  // MemtoReg: 0 selects the ALU result, 1 the data memory output
  mux2 #(.W(32)) u_mux_memtoreg (.sel(ctrl.mem_to_reg), .in0(alu_result), .in1(mem_out), .y(bus_w));

  always_comb begin
    dmem_we    = ctrl.mem_wr;
    dmem_adr   = alu_result;
    dmem_wdata = bus_b;
  end

endmodule
