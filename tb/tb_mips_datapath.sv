// Self-checking testbench of the datapath on its own. The control points
// come from a decode table in this testbench, written from the register
// transfers of each instruction, so the datapath is checked without the
// control module. A generated program is run against the instruction-level
// reference model: PC every cycle, register file and memory window at the
// end, and the Equal condition on every beq.
module tb_mips_datapath;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  logic        clk = 1'b0, rst, load_we, dmp, equal;
  logic [31:0] load_adr, load_data, pc, instr, dmem_adr, dmem_wdata;
  logic        dmem_we;
  ctrl_t       ctrl;
  logic [31:0] prog [256];
  state_t      model;
  events_t     ev;
  int checks = 0, failures = 0, n_beq = 0;

  mips_datapath dut (
    .clk(clk), .rst(rst), .ctrl(ctrl), .instr(instr), .equal(equal), .pc(pc), .dmp(dmp),
    .dmem_we(dmem_we), .dmem_adr(dmem_adr), .dmem_wdata(dmem_wdata),
    .load_we(load_we), .load_adr(load_adr), .load_data(load_data)
  );

  always #5 clk = ~clk;

  // Decode table of the testbench
  always_comb begin
    logic [5:0] op, fn;
    op = instr[31:26]; fn = instr[5:0];
    ctrl = '{npc_sel: 1'b0, reg_wr: 1'b0, reg_dst: 1'b0, ext_op: EXT_ZERO,
             alu_src: 1'b0, alu_ctr: ALU_ADD, mem_wr: 1'b0, mem_to_reg: 1'b0};
    if (op == 6'h00 && fn == 6'h21) begin ctrl.reg_wr = 1; ctrl.reg_dst = 1; end
    if (op == 6'h00 && fn == 6'h23) begin ctrl.reg_wr = 1; ctrl.reg_dst = 1; ctrl.alu_ctr = ALU_SUB; end
    if (op == 6'h0d) begin ctrl.reg_wr = 1; ctrl.alu_src = 1; ctrl.alu_ctr = ALU_OR; end
    if (op == 6'h23) begin ctrl.reg_wr = 1; ctrl.alu_src = 1; ctrl.ext_op = EXT_SIGN; ctrl.mem_to_reg = 1; end
    if (op == 6'h2b) begin ctrl.mem_wr = 1; ctrl.alu_src = 1; ctrl.ext_op = EXT_SIGN; end
    if (op == 6'h04) begin ctrl.alu_ctr = ALU_SUB; ctrl.npc_sel = equal; end
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int halt, steps;
    rst = 1'b1; load_we = 1'b0; load_adr = '0; load_data = '0; dmp = 1'b0;
    for (int i = 0; i < 32; i++) model.r[i] = '0;
    for (int i = 0; i < 256; i++) model.m[i] = '0;
    halt = gen_program(prog, 200);
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); load_we = 1'b1; load_adr = 32'(i) * 4; load_data = prog[i];
    end
    @(negedge clk); load_we = 1'b0;
    @(negedge clk); rst = 1'b0;
    model.pc = 0;
    steps = 0;
    while (model.pc != 32'(halt) && steps < 1000) begin
      logic [31:0] cur;
      cur = prog[model.pc[9:2]];
      checks++;
      if (pc !== model.pc) begin fail($sformatf("pc=%h expected %h", pc, model.pc)); break; end
      if (cur[31:26] == 6'h04) begin
        n_beq++;
        checks++;
        if (equal !== (model.r[cur[25:21]] == model.r[cur[20:16]])) fail($sformatf("Equal at %h", pc));
      end
      ev = step(model, cur);
      @(negedge clk);
      steps++;
    end
    checks++;
    if (pc !== 32'(halt)) fail("halt not reached");
    for (int r = 1; r < 32; r++) begin
      checks++;
      if (dut.u_rf.regs[r] !== model.r[r]) fail($sformatf("R%0d=%h expected %h", r, dut.u_rf.regs[r], model.r[r]));
    end
    for (int w = 112; w < 144; w++) begin
      checks++;
      if (dut.u_dmem.mem[w] !== model.m[w]) fail($sformatf("M[%0d]=%h expected %h", w, dut.u_dmem.mem[w], model.m[w]));
    end
    checks++;
    if (n_beq == 0) fail("no beq executed");
    $display("%0d instructions, %0d beq", steps, n_beq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
