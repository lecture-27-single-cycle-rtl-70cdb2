// Register file: 32 registers of 32 bits, two read ports, one write port.
//
// Reads are combinational: ra selects the register driven on bus_a and rb
// the one on bus_b, valid one access time after the register numbers are.
// The clock matters only for writing: on a rising edge with we asserted,
// bus_w is stored in register rw. Register 0 is never written and always
// reads as zero, which makes $0 the MIPS constant zero.
//
// A rising edge on dmp (sampled by the clock) prints all 32 registers to the
// simulator console; synthesis ignores the print.
//
// Follows the original datapath description: 32 x 32 bits, two asynchronous read ports, one
// synchronous write port, writes to register 0 suppressed, the dump input.
// This design's choice: register 0 reads zero by decoding rather than by
// storage, and the dump is taken on the clock edge after dmp rises.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic          dmp,
  input  logic [AW-1:0] rw,
  input  logic [W-1:0]  bus_w,
  input  logic [AW-1:0] ra,
  output logic [W-1:0]  bus_a,
  input  logic [AW-1:0] rb,
  output logic [W-1:0]  bus_b
);

  logic [W-1:0] regs [NREGS];
  logic         dmp_q;

  always_ff @(posedge clk) begin
    if (we && rw != '0) regs[rw] <= bus_w;
  end

  always_comb begin
    bus_a = (ra == '0) ? '0 : regs[ra];
    bus_b = (rb == '0) ? '0 : regs[rb];
  end

  // Console dump of the register contents
  always_ff @(posedge clk) begin
    dmp_q <= dmp;
    if (dmp && !dmp_q) begin
      for (int i = 0; i < NREGS; i++)
        $display("R[%0d] = %h", i, (i == 0) ? '0 : regs[i]);
    end
  end

endmodule
