// tb_acu_decoder: decodes random instances of every supported instruction,
// sequential and parallel, and checks the micro-instruction fields against
// expectations derived here from the MIPS field layout.
module tb_acu_decoder;
  import simd_pkg::*;
  import simd_asm::*;
  logic valid;
  word_t instr;
  uinstr_t u;
  int checks = 0, failures = 0;

  acu_decoder dut (.*);

  task automatic expect_u(string what, word_t w, logic par, alu_op_e op, int dst,
                          logic rw, logic b_imm, word_t imm, logic mr, logic mw);
    valid = 1; instr = w; #1;
    checks++;
    if (!u.valid || u.par !== par || u.alu_op !== op || u.reg_write !== rw ||
        (rw && u.rd !== 5'(dst)) || u.b_imm !== b_imm || (b_imm && u.imm !== imm) ||
        u.mem_read !== mr || u.mem_write !== mw || u.rs !== w[25:21] || u.rt !== w[20:16]) begin
      failures++;
      $display("FAIL %s %h: par=%b op=%s rd=%0d rw=%b bimm=%b imm=%h mr=%b mw=%b", what, w,
               u.par, u.alu_op.name(), u.rd, u.reg_write, u.b_imm, u.imm, u.mem_read, u.mem_write);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (100) begin
      automatic int a = $urandom_range(31), b = $urandom_range(31), c = $urandom_range(31);
      automatic int k = $urandom_range(16'hFFFF);
      automatic word_t sx = {{16{k[15]}}, k[15:0]}, zx = {16'h0, k[15:0]};
      expect_u("addi",  ADDI(a, b, k),  0, ALU_ADD,  a, 1, 1, sx, 0, 0);
      expect_u("paddi", PADDI(a, b, k), 1, ALU_ADD,  a, 1, 1, sx, 0, 0);
      expect_u("ori",   ORI(a, b, k),   0, ALU_OR,   a, 1, 1, zx, 0, 0);
      expect_u("pori",  PORI(a, b, k),  1, ALU_OR,   a, 1, 1, zx, 0, 0);
      expect_u("andi",  ANDI(a, b, k),  0, ALU_AND,  a, 1, 1, zx, 0, 0);
      expect_u("slti",  SLTI(a, b, k),  0, ALU_SLT,  a, 1, 1, sx, 0, 0);
      expect_u("pslti", PSLTI(a, b, k), 1, ALU_SLT,  a, 1, 1, sx, 0, 0);
      expect_u("lui",   LUI(a, k),      0, ALU_LUI,  a, 1, 1, zx, 0, 0);
      expect_u("plui",  PLUI(a, k),     1, ALU_LUI,  a, 1, 1, zx, 0, 0);
      expect_u("lw",    LW(a, k, b),    0, ALU_ADD,  a, 1, 1, sx, 1, 0);
      expect_u("plw",   PLW(a, k, b),   1, ALU_ADD,  a, 1, 1, sx, 1, 0);
      expect_u("sw",    SW(a, k, b),    0, ALU_ADD,  0, 0, 1, sx, 0, 1);
      expect_u("psw",   PSW(a, k, b),   1, ALU_ADD,  0, 0, 1, sx, 0, 1);
      expect_u("add",   ADD(c, a, b),   0, ALU_ADD,  c, 1, 0, 0, 0, 0);
      expect_u("padd",  PADD(c, a, b),  1, ALU_ADD,  c, 1, 0, 0, 0, 0);
      expect_u("sub",   SUB(c, a, b),   0, ALU_SUB,  c, 1, 0, 0, 0, 0);
      expect_u("psub",  PSUB(c, a, b),  1, ALU_SUB,  c, 1, 0, 0, 0, 0);
      expect_u("mul",   MUL(c, a, b),   0, ALU_MUL,  c, 1, 0, 0, 0, 0);
      expect_u("pmul",  PMUL(c, a, b),  1, ALU_MUL,  c, 1, 0, 0, 0, 0);
      // shifts by constant: A comes from the shift amount
      valid = 1; instr = PSRA(c, b, a % 32); #1;
      checks++;
      if (!(u.valid && u.par && u.alu_op == ALU_SRA && u.a_shamt && u.imm == 32'(a % 32) && u.rd == 5'(c)))
        begin failures++; $display("FAIL psra"); end
      // branches and jumps: sequential only
      instr = BEQ(a, b, k); #1;
      checks++; if (!(u.valid && !u.par && u.branch == BR_EQ && u.imm == sx && !u.reg_write)) begin failures++; $display("FAIL beq"); end
      instr = BNE(a, b, k); #1;
      checks++; if (!(u.valid && u.branch == BR_NE)) begin failures++; $display("FAIL bne"); end
      instr = JAL(k); #1;
      checks++; if (!(u.valid && u.jump && u.link && u.rd == 31 && u.reg_write && u.jidx == 26'(k))) begin failures++; $display("FAIL jal"); end
      instr = JR(a); #1;
      checks++; if (!(u.valid && u.jump_reg && !u.reg_write && u.rs == 5'(a))) begin failures++; $display("FAIL jr"); end
    end
    instr = BREAK(); #1;
    checks++; if (!(u.valid && u.halt)) begin failures++; $display("FAIL break"); end
    valid = 0; instr = ADDI(1, 2, 3); #1;
    checks++; if (u.valid) begin failures++; $display("FAIL bubble"); end
    valid = 1; instr = {6'h3E, 26'h0} ^ {6'h3E ^ 6'h13, 26'h0}; #1;  // opcode 0x13 unused
    checks++; if (u.valid) begin failures++; $display("FAIL unknown opcode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
