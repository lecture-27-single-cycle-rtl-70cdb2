// Self-checking testbench of the next address logic: sequential PC + 4 and
// the beq target PC + 4 + SignExt(imm16) * 4, forward and backward.
module tb_next_pc;
  logic [31:0] pc, pc_plus4, next;
  logic [15:0] imm16;
  logic        npc_sel;
  int checks = 0, failures = 0;

  next_pc dut (.pc(pc), .imm16(imm16), .npc_sel(npc_sel), .pc_plus4(pc_plus4), .next(next));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      longint signed off;
      logic [31:0] expect_n;
      pc = {30'($urandom), 2'b00};
      imm16 = (i < 4) ? 16'(32'hffff - i) : 16'($urandom);
      npc_sel = 1'($urandom);
      #1;
      off = longint'(shortint'(imm16)) * 4;
      expect_n = npc_sel ? 32'(longint'(pc) + 4 + off) : pc + 32'd4;
      checks += 2;
      if (pc_plus4 !== pc + 32'd4) begin failures++; $display("FAIL pc+4"); end
      if (next !== expect_n) begin failures++; $display("FAIL pc=%h imm=%h sel=%b next=%h expected %h", pc, imm16, npc_sel, next, expect_n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
