// Instruction memory: word-wide, DEPTH words, read at a byte address.
//
// The fetch side is combinational: instr is the word at adr[AW+1:2] (adr[9:2]
// for the default 256 words), valid one access time after the address.
// The datapath never writes it. A separate load port (load_we, load_adr,
// load_data), clocked on the rising edge, puts a program into the memory
// before or while the processor runs; load_adr is a byte address as well.
//
// Follows the original datapath description: an ideal instruction memory addressed by the PC that
// returns a 32-bit instruction word, organised like the 256-word memArray.
// This design's choice: the load port, and the depth shared with the data
// memory.
module imem #(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic [31:0] adr,
  output logic [31:0] instr,
  input  logic        load_we,
  input  logic [31:0] load_adr,
  input  logic [31:0] load_data
);

  logic [31:0] mem [DEPTH];

  always_comb instr = mem[adr[AW+1:2]];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_adr[AW+1:2]] <= load_data;
  end

endmodule
