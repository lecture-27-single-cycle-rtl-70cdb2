// Single-cycle MIPS subset processor: control and datapath.
//
// The control decodes the instruction the datapath fetches and, with the
// Equal condition the datapath returns, sets the datapath's control points
// for the cycle; one instruction (addu, subu, ori, lw, sw, beq) completes
// per rising clock edge, so CPI is 1.
//
// Interface: clk and a synchronous active-high rst (PC to 0); an
// instruction memory load port (load_we, load_adr, load_data) to place a
// program, best used while rst is held; dmp prints the register file; pc,
// instr and the data memory write signals (dmem_we, dmem_adr, dmem_wdata)
// are brought out for observation. Memories are 256 words (1 KiB) each by
// default. The split into control and datapath follows the original datapath description; the
// ports for loading and observing are this design's choice.
module mips_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_we,
  input  logic [31:0] load_adr,
  input  logic [31:0] load_data,
  input  logic        dmp,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        dmem_we,
  output logic [31:0] dmem_adr,
  output logic [31:0] dmem_wdata
);

  ctrl_t ctrl;
  logic  equal;

  mips_control u_ctrl (.op(instr[31:26]), .funct(instr[5:0]), .equal(equal), .ctrl(ctrl));

  mips_datapath #(.IMEM_DEPTH(IMEM_DEPTH), .DMEM_DEPTH(DMEM_DEPTH)) u_dp (
    .clk(clk), .rst(rst), .ctrl(ctrl), .instr(instr), .equal(equal), .pc(pc),
    .dmp(dmp), .dmem_we(dmem_we), .dmem_adr(dmem_adr), .dmem_wdata(dmem_wdata),
    .load_we(load_we), .load_adr(load_adr), .load_data(load_data)
  );

endmodule
