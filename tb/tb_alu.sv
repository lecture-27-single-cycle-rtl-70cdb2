// Self-checking testbench of the ALU: add, subtract and or on random and
// corner operands, and the Equal flag on equal and unequal pairs.
module tb_alu;
  import mips_pkg::*;
  alu_op_e     ctr;
  logic [31:0] a, b, result;
  logic        equal;
  int checks = 0, failures = 0;

  alu dut (.alu_ctr(ctr), .a(a), .b(b), .result(result), .equal(equal));

  task automatic check(input alu_op_e c, input logic [31:0] x, input logic [31:0] y);
    logic [31:0] expect_r;
    ctr = c; a = x; b = y; #1;
    case (c)
      ALU_ADD: expect_r = 32'((64'(x) + 64'(y)) % 64'h1_0000_0000);
      ALU_SUB: expect_r = 32'((64'(x) + 64'h1_0000_0000 - 64'(y)) % 64'h1_0000_0000);
      ALU_OR:  expect_r = x | y;
      default: expect_r = '0;
    endcase
    checks += 2;
    if (result !== expect_r) begin
      failures++; $display("FAIL %s %h %h -> %h, expected %h", c.name(), x, y, result, expect_r);
    end
    if (equal !== (x == y)) begin
      failures++; $display("FAIL equal %h %h -> %b", x, y, equal);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(ALU_ADD, 32'hffff_ffff, 32'h1);
    check(ALU_SUB, 32'h0, 32'h1);
    check(ALU_SUB, 32'h1234_5678, 32'h1234_5678);
    check(ALU_OR,  32'hf0f0_0000, 32'h0000_0f0f);
    for (int i = 0; i < 300; i++) begin
      logic [31:0] x, y;
      x = $urandom; y = (i % 5 == 0) ? x : $urandom;
      check(ALU_ADD, x, y);
      check(ALU_SUB, x, y);
      check(ALU_OR,  x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
