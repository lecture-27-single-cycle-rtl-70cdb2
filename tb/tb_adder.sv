// Self-checking testbench of the adder: random and corner operands,
// sums compared with a 64-bit reference truncated to 32 bits.
module tb_adder;
  logic [31:0] a, b, sum;
  int checks = 0, failures = 0;

  adder #(.W(32)) dut (.a(a), .b(b), .sum(sum));

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] ref64;
    a = x; b = y; #1;
    ref64 = {32'b0, x} + {32'b0, y};
    checks++;
    if (sum !== ref64[31:0]) begin
      failures++;
      $display("FAIL %h + %h = %h, expected %h", x, y, sum, ref64[31:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0, 32'h0);
    check(32'hffff_ffff, 32'h1);
    check(32'h7fff_ffff, 32'h1);
    check(32'h0000_0004, 32'hffff_fff0);
    for (int i = 0; i < 200; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
