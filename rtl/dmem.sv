// Data memory: word-wide, DEPTH words, byte addressed.
//
// The memory holds 32-bit words; lw and sw only use word-aligned byte
// addresses, so the word is selected by adr[AW+1:2] and the two low address
// bits are ignored. With the default 256 words that is adr[9:2] and 1024
// bytes. Reading is combinational (data_out follows adr). Writing takes
// place on the rising clock edge when wr_en is asserted.
//
// Follows the original datapath description: 32-bit words, 2^8 deep, index adr[9:2], WrEn/Adr/
// Data In/Data Out/Clk ports. This design's choice: address bits above 9
// are ignored (the memory repeats), and the contents are not initialised.
// An assertion flags a write to an address that is not word aligned.
module dmem #(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        wr_en,
  input  logic [31:0] adr,
  input  logic [31:0] data_in,
  output logic [31:0] data_out
);

  logic [31:0]   mem [DEPTH];
  logic [AW-1:0] widx;

  always_comb widx = adr[AW+1:2];
  always_comb data_out = mem[widx];

  always_ff @(posedge clk) begin
    if (wr_en) mem[widx] <= data_in;
  end

  // sw only issues word-aligned addresses
  a_aligned_write: assert property (@(posedge clk) wr_en |-> adr[1:0] == 2'b00)
    else $error("dmem: unaligned store to %h", adr);

endmodule
