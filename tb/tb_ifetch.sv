// Self-checking testbench of the instruction fetch unit: after a program
// is loaded and reset released, the PC must step by 4 per clock, jump to
// PC + 4 + SignExt(imm16)*4 in the cycle nPC_sel is asserted, keep bits
// 1:0 at zero, and the instruction output must be the word at the PC.
module tb_ifetch;
  logic        clk = 1'b0, rst, npc_sel, load_we;
  logic [15:0] imm16;
  logic [31:0] pc, instr, load_adr, load_data, model_pc;
  logic [31:0] prog [256];
  int checks = 0, failures = 0, jumps = 0;

  ifetch dut (.clk(clk), .rst(rst), .npc_sel(npc_sel), .imm16(imm16), .pc(pc), .instr(instr),
              .load_we(load_we), .load_adr(load_adr), .load_data(load_data));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; npc_sel = 1'b0; imm16 = '0; load_we = 1'b0; load_adr = '0; load_data = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); load_we = 1'b1; load_adr = 32'(i) * 4; load_data = $urandom; prog[i] = load_data;
    end
    @(negedge clk); load_we = 1'b0;
    @(negedge clk); rst = 1'b0;
    model_pc = 32'h0;
    checks++;
    if (pc !== 32'h0) begin failures++; $display("FAIL reset pc=%h", pc); end
    for (int n = 0; n < 1000; n++) begin
      #1;
      checks += 2;
      if (pc !== model_pc) begin failures++; $display("FAIL pc=%h expected %h", pc, model_pc); end
      if (instr !== prog[model_pc[9:2]]) begin failures++; $display("FAIL instr at %h", pc); end
      npc_sel = ($urandom % 4) == 0;
      imm16 = 16'($urandom % 64) - 16'd32;
      if (npc_sel) begin
        jumps++;
        model_pc = model_pc + 4 + {{14{imm16[15]}}, imm16, 2'b00};
      end else model_pc = model_pc + 4;
      @(negedge clk);
    end
    checks++;
    if (jumps == 0) begin failures++; $display("FAIL no branch exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
