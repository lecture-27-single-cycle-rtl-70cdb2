// Self-checking testbench of the main control: each of the six
// instructions, beq with Equal both ways, and unsupported encodings, with
// the expected control points written out per instruction.
module tb_mips_control;
  import mips_pkg::*;
  logic [5:0] op, funct;
  logic       equal;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  mips_control dut (.op(op), .funct(funct), .equal(equal), .ctrl(ctrl));

  // expected: {npc_sel, reg_wr, reg_dst, alu_src, alu_ctr, mem_wr, mem_to_reg}; ext_op checked separately
  task automatic check(input string nm, input logic [5:0] o, input logic [5:0] f, input logic eq,
                       input logic e_npc, input logic e_wr, input logic e_dst, input logic e_src,
                       input alu_op_e e_alu, input logic e_mw, input logic e_m2r,
                       input logic chk_ext, input ext_op_e e_ext);
    op = o; funct = f; equal = eq; #1;
    checks++;
    if (ctrl.npc_sel !== e_npc || ctrl.reg_wr !== e_wr || ctrl.mem_wr !== e_mw ||
        (e_wr && ctrl.reg_dst !== e_dst) || (e_wr && ctrl.mem_to_reg !== e_m2r) ||
        (e_wr || e_mw ? ctrl.alu_src !== e_src : 1'b0) ||
        (e_wr || e_mw ? ctrl.alu_ctr !== e_alu : 1'b0) ||
        (chk_ext && ctrl.ext_op !== e_ext)) begin
      failures++;
      $display("FAIL %s: ctrl=%p", nm, ctrl);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++) begin
      //              op     funct  eq   npc wr dst src alu      mw m2r chkext ext
      check("addu", 6'h00, 6'h21, k[0], 0, 1, 1, 0, ALU_ADD, 0, 0, 0, EXT_ZERO);
      check("subu", 6'h00, 6'h23, k[0], 0, 1, 1, 0, ALU_SUB, 0, 0, 0, EXT_ZERO);
      check("ori",  6'h0d, 6'h3f, k[0], 0, 1, 0, 1, ALU_OR,  0, 0, 1, EXT_ZERO);
      check("lw",   6'h23, 6'h00, k[0], 0, 1, 0, 1, ALU_ADD, 0, 1, 1, EXT_SIGN);
      check("sw",   6'h2b, 6'h15, k[0], 0, 0, 0, 1, ALU_ADD, 1, 0, 1, EXT_SIGN);
      check("beq",  6'h04, 6'h00, k[0], k[0], 0, 0, 0, ALU_SUB, 0, 0, 0, EXT_ZERO);
      check("rtype other", 6'h00, 6'h20, k[0], 0, 0, 0, 0, ALU_ADD, 0, 0, 0, EXT_ZERO);
      check("op other",    6'h3f, 6'h21, k[0], 0, 0, 0, 0, ALU_ADD, 0, 0, 0, EXT_ZERO);
    end
    // Every other op/funct pair must be a no-operation
    for (int o = 0; o < 64; o++)
      for (int f = 0; f < 64; f++) begin
        logic known;
        known = (o == 'h00 && (f == 'h21 || f == 'h23)) || o == 'h0d || o == 'h23 || o == 'h2b || o == 'h04;
        if (!known) begin
          op = 6'(o); funct = 6'(f); equal = 1'($urandom); #1;
          checks++;
          if (ctrl.reg_wr || ctrl.mem_wr || ctrl.npc_sel) begin
            failures++; $display("FAIL op=%h funct=%h not a no-operation", op, funct);
          end
        end
      end
    // beq must compare the registers themselves, not an immediate
    op = 6'h04; funct = 6'h00; equal = 1'b1; #1;
    checks++;
    if (ctrl.alu_src !== 1'b0) begin failures++; $display("FAIL beq ALUSrc"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
