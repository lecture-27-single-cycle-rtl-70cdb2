// N-bit storage register with write enable.
//
// On each rising clock edge the register loads D when the write enable is
// asserted and holds its value when it is deasserted. A synchronous,
// active-high reset loads RESET_VALUE and takes priority over the write
// enable. Q changes only after the rising edge (clock-to-Q), so all storage
// elements of the processor update on the same edge.
//
// Ports: clk, rst, we (write enable), d (data in), q (data out).
// The N-bit data, the write enable and the rising-edge clocking follow the
// original datapath description; the reset value parameter is this design's own addition.
module register #(
  parameter int unsigned      N           = 32,
  parameter logic [N-1:0]     RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VALUE;
    else if (we) q <= d;
  end

endmodule
