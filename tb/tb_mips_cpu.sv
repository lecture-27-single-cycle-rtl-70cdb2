// End-to-end testbench of the processor with all parameters at their
// defaults (256-word instruction and data memories).
//
// Several generated programs (setup, a directed sequence, random addu,
// subu, ori, lw, sw and beq, then a branch to itself) are loaded through
// the load port while reset is held, and run. Every cycle the PC, the
// fetched instruction and the data memory write port are compared with an
// instruction-level reference model, which executes exactly one instruction
// per cycle, so the cycle count (CPI = 1) is checked along the way. At the
// end of each program the registers and the memory window are compared.
// The testbench counts each mechanism the datapath has (each instruction
// kind, beq taken and not taken, a dropped write to register 0, a negative
// sign-extended offset, a zero-extended immediate with bit 15 set) and
// fails if one never happened.
module tb_mips_cpu;
  import mips_asm_pkg::*;

  localparam int NPROG = 6;

  logic        clk = 1'b0, rst, load_we, dmp;
  logic [31:0] load_adr, load_data;
  logic [31:0] pc, instr, dmem_adr, dmem_wdata;
  logic        dmem_we;
  logic [31:0] prog [256];
  logic [31:0] cur, exp_adr, exp_data;
  state_t      model;
  events_t     ev;
  int checks = 0, failures = 0;
  int n_addu = 0, n_subu = 0, n_ori = 0, n_lw = 0, n_sw = 0, n_taken = 0, n_not_taken = 0;
  int n_r0 = 0, n_neg = 0, n_orihi = 0, cycles = 0;

  mips_cpu dut (
    .clk(clk), .rst(rst), .load_we(load_we), .load_adr(load_adr), .load_data(load_data),
    .dmp(dmp), .pc(pc), .instr(instr),
    .dmem_we(dmem_we), .dmem_adr(dmem_adr), .dmem_wdata(dmem_wdata)
  );

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  task automatic need(input string nm, input int n);
    checks++;
    if (n == 0) fail($sformatf("mechanism never exercised: %s", nm));
    else $display("  %-22s %0d", nm, n);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load_we = 1'b0; load_adr = '0; load_data = '0; dmp = 1'b0;
    for (int i = 0; i < 32; i++) model.r[i] = '0;
    for (int i = 0; i < 256; i++) model.m[i] = '0;
    for (int p = 0; p < NPROG; p++) begin
      int halt, steps;
      halt = gen_program(prog, (p == 0) ? 120 : 256);
      @(negedge clk); rst = 1'b1;
      for (int i = 0; i < 256; i++) begin
        @(negedge clk); load_we = 1'b1; load_adr = 32'(i) * 4; load_data = prog[i];
      end
      @(negedge clk); load_we = 1'b0;
      @(negedge clk); rst = 1'b0;
      model.pc = 0;
      steps = 0;
      while (model.pc != 32'(halt) && steps < 2000) begin
        checks++;
        if (pc !== model.pc) begin
          fail($sformatf("cycle %0d: pc=%h expected %h", steps, pc, model.pc));
          break;
        end
        checks++;
        if (instr !== prog[model.pc[9:2]]) fail($sformatf("instr at %h", pc));
        cur = prog[model.pc[9:2]];
        exp_adr  = model.r[cur[25:21]] + {{16{cur[15]}}, cur[15:0]};
        exp_data = model.r[cur[20:16]];
        ev = step(model, cur);
        checks++;
        if (dmem_we !== ev.is_sw) fail($sformatf("MemWr at %h", pc));
        else if (ev.is_sw && (dmem_adr !== exp_adr || dmem_wdata !== exp_data))
          fail($sformatf("store at %h: adr=%h data=%h, expected %h %h", pc, dmem_adr, dmem_wdata, exp_adr, exp_data));
        n_addu += int'(ev.is_addu); n_subu += int'(ev.is_subu); n_ori += int'(ev.is_ori);
        n_lw += int'(ev.is_lw); n_sw += int'(ev.is_sw);
        n_taken += int'(ev.beq_taken); n_not_taken += int'(ev.beq_not_taken);
        n_r0 += int'(ev.r0_write); n_neg += int'(ev.neg_offset); n_orihi += int'(ev.ori_hi_imm);
        @(negedge clk);
        steps++;
        cycles++;
      end
      // One instruction per cycle: the halt is reached after exactly as many
      // cycles as the model executed instructions.
      checks++;
      if (pc !== 32'(halt)) fail($sformatf("program %0d: pc=%h after %0d cycles, halt at %h", p, pc, steps, halt));
      // The branch to itself keeps the PC in place
      @(negedge clk);
      checks++;
      if (pc !== 32'(halt)) fail("halt loop left");
      for (int r = 1; r < 32; r++) begin
        checks++;
        if (dut.u_dp.u_rf.regs[r] !== model.r[r])
          fail($sformatf("program %0d: R%0d=%h expected %h", p, r, dut.u_dp.u_rf.regs[r], model.r[r]));
      end
      for (int w = 112; w < 144; w++) begin
        checks++;
        if (dut.u_dp.u_dmem.mem[w] !== model.m[w])
          fail($sformatf("program %0d: M[%0d]=%h expected %h", p, w, dut.u_dp.u_dmem.mem[w], model.m[w]));
      end
      $display("program %0d: %0d instructions in %0d cycles", p, steps, steps);
    end
    // Register dump at the end
    @(negedge clk); dmp = 1'b1;
    @(negedge clk); dmp = 1'b0;
    @(negedge clk);
    $display("mechanisms exercised (total %0d cycles):", cycles);
    need("addu", n_addu);
    need("subu", n_subu);
    need("ori", n_ori);
    need("lw", n_lw);
    need("sw", n_sw);
    need("beq taken", n_taken);
    need("beq not taken", n_not_taken);
    need("write to r0 dropped", n_r0);
    need("negative offset", n_neg);
    need("ori imm bit15 set", n_orihi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
