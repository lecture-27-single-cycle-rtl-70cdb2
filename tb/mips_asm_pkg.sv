// Testbench helpers: instruction encoders for the six supported
// instructions (standard MIPS formats) and an instruction-level reference
// model of the processor state, written independently of the RTL.
package mips_asm_pkg;

  function automatic logic [31:0] addu(input int rd, input int rs, input int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'h00, 6'h21};
  endfunction

  function automatic logic [31:0] subu(input int rd, input int rs, input int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'h00, 6'h23};
  endfunction

  function automatic logic [31:0] ori(input int rt, input int rs, input logic [15:0] imm);
    return {6'h0d, 5'(rs), 5'(rt), imm};
  endfunction

  function automatic logic [31:0] lw(input int rt, input int rs, input logic [15:0] imm);
    return {6'h23, 5'(rs), 5'(rt), imm};
  endfunction

  function automatic logic [31:0] sw(input int rt, input int rs, input logic [15:0] imm);
    return {6'h2b, 5'(rs), 5'(rt), imm};
  endfunction

  function automatic logic [31:0] beq(input int rs, input int rt, input logic [15:0] imm);
    return {6'h04, 5'(rs), 5'(rt), imm};
  endfunction

  // Architectural state of the reference model
  typedef struct {
    logic [31:0] pc;
    logic [31:0] r [32];
    logic [31:0] m [256];
  } state_t;

  // Events the reference model saw while executing one instruction
  typedef struct packed {
    logic is_addu, is_subu, is_ori, is_lw, is_sw, beq_taken, beq_not_taken;
    logic r0_write, neg_offset, ori_hi_imm, other;
  } events_t;

  // Executes the instruction at s.pc, as the register transfers define it
  function automatic events_t step(ref state_t s, input logic [31:0] ins);
    events_t     ev = '0;
    logic [5:0]  op = ins[31:26];
    logic [4:0]  rs = ins[25:21], rt = ins[20:16], rd = ins[15:11];
    logic [5:0]  fn = ins[5:0];
    logic [15:0] imm = ins[15:0];
    logic [31:0] a = s.r[rs], b = s.r[rt];
    logic [31:0] sx = {{16{imm[15]}}, imm};
    logic [31:0] npc = s.pc + 4;
    int          wreg = -1;
    logic [31:0] wval = '0;
    if (op == 6'h00 && fn == 6'h21) begin ev.is_addu = 1; wreg = rd; wval = a + b; end
    else if (op == 6'h00 && fn == 6'h23) begin ev.is_subu = 1; wreg = rd; wval = a - b; end
    else if (op == 6'h0d) begin ev.is_ori = 1; ev.ori_hi_imm = imm[15]; wreg = rt; wval = a | {16'h0, imm}; end
    else if (op == 6'h23) begin ev.is_lw = 1; ev.neg_offset = imm[15]; wreg = rt; wval = s.m[8'((a + sx) >> 2)]; end
    else if (op == 6'h2b) begin ev.is_sw = 1; ev.neg_offset = imm[15]; s.m[8'((a + sx) >> 2)] = b; end
    else if (op == 6'h04) begin
      if (a == b) begin ev.beq_taken = 1; npc = s.pc + 4 + (sx << 2); end
      else ev.beq_not_taken = 1;
    end
    else ev.other = 1;
    if (wreg == 0) ev.r0_write = 1;
    else if (wreg > 0) s.r[wreg] = wval;
    s.pc = npc;
    return ev;
  endfunction

  // Memory window of the generated programs: base register r8 = 0x200,
  // offsets -64 .. +60, i.e. words 112 .. 143 of the data memory.
  localparam int BASE_REG  = 8;
  localparam int BASE_ADDR = 'h200;

  // Fills prog[0 .. n-1] with a program that first sets every register and
  // clears the memory window, runs a short directed sequence, then random
  // addu/subu/ori/lw/sw/beq with forward branches only, and ends in "beq r0, r0, -1" (a branch to
  // itself). Returns the byte address of that final halt instruction.
  function automatic int gen_program(ref logic [31:0] prog [256], input int n);
    int k = 0;
    for (int r = 1; r < 32; r++) prog[k++] = ori(r, 0, (r == BASE_REG) ? 16'(BASE_ADDR) : 16'($urandom));
    for (int off = -64; off < 64; off += 4) prog[k++] = sw(0, BASE_REG, 16'(off));
    prog[k++] = ori(1, 0, 16'h8001);          // immediate with bit 15 set
    prog[k++] = ori(2, 1, 16'h7ffe);
    prog[k++] = addu(3, 1, 2);
    prog[k++] = subu(4, 0, 3);                // negative result
    prog[k++] = sw(4, BASE_REG, 16'hffc0);    // negative offset store
    prog[k++] = lw(5, BASE_REG, 16'hffc0);    // and load back
    prog[k++] = beq(5, 4, 16'd1);             // taken, skips one
    prog[k++] = ori(6, 0, 16'hdead);          // skipped
    prog[k++] = beq(5, 3, 16'd1);             // not taken
    prog[k++] = addu(0, 1, 2);                // write to r0 is dropped
    while (k < n - 1) begin
      int kind = $urandom % 6;
      int rd = $urandom % 32, rs = $urandom % 32, rt = $urandom % 32;
      logic [15:0] off = 16'(($urandom % 32) * 4 - 64);
      if (rd == BASE_REG) rd = 9;
      if (rt == BASE_REG && kind != 4 && kind != 5) rt = 10;
      case (kind)
        0: prog[k++] = addu(rd, rs, rt);
        1: prog[k++] = subu(rd, rs, rt);
        2: prog[k++] = ori(rt, rs, 16'($urandom));
        3: prog[k++] = lw(rt, BASE_REG, off);
        4: prog[k++] = sw(rt, BASE_REG, off);
        default: begin
          int skip = $urandom % 4;
          if (k + 1 + skip > n - 1) skip = n - 2 - k;
          if (($urandom % 3) == 0) rt = rs;
          prog[k++] = beq(rs, rt, 16'(skip));
        end
      endcase
    end
    prog[k] = beq(0, 0, 16'hffff);
    for (int i = k + 1; i < 256; i++) prog[i] = beq(0, 0, 16'hffff);
    return k * 4;
  endfunction

endpackage
