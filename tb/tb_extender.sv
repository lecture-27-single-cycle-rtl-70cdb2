// Self-checking testbench of the immediate extender: every 16-bit value,
// zero and sign extension, compared with arithmetic on integers.
module tb_extender;
  import mips_pkg::*;
  ext_op_e     op;
  logic [15:0] imm;
  logic [31:0] ext;
  int checks = 0, failures = 0;

  extender dut (.ext_op(op), .imm16(imm), .ext(ext));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v += 7) begin
      logic [31:0] zref, sref;
      zref = v;
      sref = (v >= 32768) ? 32'(v - 65536) : 32'(v);
      imm = 16'(v);
      op = EXT_ZERO; #1;
      checks++;
      if (ext !== zref) begin failures++; $display("FAIL zero ext %h -> %h", imm, ext); end
      op = EXT_SIGN; #1;
      checks++;
      if (ext !== sref) begin failures++; $display("FAIL sign ext %h -> %h", imm, ext); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
