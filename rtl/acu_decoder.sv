// acu_decoder: the ACU decode stage. Turns one 32-bit instruction into the
// micro-instruction record (simd_pkg::uinstr_t) carried on the ACU/PE bus.
//
// Sequential instructions (MIPS-I opcodes) are marked par=0 and run in the
// ACU's execute stage; parallel instructions (opcodes 0x30..0x3F, see
// simd_pkg) are marked par=1 and run in the execute stage of every PE. Jumps,
// branches and BREAK exist only in sequential form, as the design reserves
// control flow to the ACU. Decoding is the usual MIPS field split: immediates
// are sign-extended except for ANDI/ORI/XORI, which zero-extend. An unknown
// opcode decodes to a bubble (valid=0). MUL (funct 0x18) and DIV/DIVU
// (0x1A/0x1B) write their low product or quotient to rd instead of the MIPS
// HI/LO pair, which this design does not have. Purely combinational.
module acu_decoder
  import simd_pkg::*;
(
  input  logic    valid,
  input  word_t   instr,
  output uinstr_t u
);
  logic [5:0] op, funct, base_op;
  logic [4:0] rs, rt, rd, shamt;
  word_t simm, zimm;
  logic par;

  always_comb begin
    op    = instr[31:26];
    rs    = instr[25:21];
    rt    = instr[20:16];
    rd    = instr[15:11];
    shamt = instr[10:6];
    funct = instr[5:0];
    simm  = {{16{instr[15]}}, instr[15:0]};
    zimm  = {16'b0, instr[15:0]};

    // Map a parallel opcode onto its sequential twin.
    par     = 1'b0;
    base_op = op;
    if (op == OP_P_SPECIAL) begin
      par = 1'b1; base_op = OP_SPECIAL;
    end else if (op == OP_P_LW) begin
      par = 1'b1; base_op = OP_LW;
    end else if (op == OP_P_SW) begin
      par = 1'b1; base_op = OP_SW;
    end else if (op[5:3] == 3'b111) begin
      par = 1'b1; base_op = {3'b001, op[2:0]};
    end

    u        = '0;
    u.valid  = valid;
    u.par    = par;
    u.rs     = rs;
    u.rt     = rt;
    u.alu_op = ALU_ADD;
    u.jidx   = instr[25:0];

    unique case (base_op)
      OP_SPECIAL: begin
        u.rd        = rd;
        u.reg_write = 1'b1;
        unique case (funct)
          F_SLL:  begin u.alu_op = ALU_SLL; u.a_shamt = 1'b1; u.imm = word_t'(shamt); end
          F_SRL:  begin u.alu_op = ALU_SRL; u.a_shamt = 1'b1; u.imm = word_t'(shamt); end
          F_SRA:  begin u.alu_op = ALU_SRA; u.a_shamt = 1'b1; u.imm = word_t'(shamt); end
          F_SLLV: u.alu_op = ALU_SLL;
          F_SRLV: u.alu_op = ALU_SRL;
          F_SRAV: u.alu_op = ALU_SRA;
          F_MUL:  u.alu_op = ALU_MUL;
          F_DIV:  begin u.div = 1'b1; u.div_sgn = 1'b1; end
          F_DIVU: u.div = 1'b1;
          F_ADD, F_ADDU: u.alu_op = ALU_ADD;
          F_SUB, F_SUBU: u.alu_op = ALU_SUB;
          F_AND:  u.alu_op = ALU_AND;
          F_OR:   u.alu_op = ALU_OR;
          F_XOR:  u.alu_op = ALU_XOR;
          F_NOR:  u.alu_op = ALU_NOR;
          F_SLT:  u.alu_op = ALU_SLT;
          F_SLTU: u.alu_op = ALU_SLTU;
          F_JR:   begin u.jump_reg = 1'b1; u.reg_write = 1'b0; end
          F_JALR: begin u.jump_reg = 1'b1; u.link = 1'b1; end
          F_BREAK: begin u.halt = 1'b1; u.reg_write = 1'b0; end
          default: begin u.valid = 1'b0; u.reg_write = 1'b0; end
        endcase
      end
      OP_ADDI, OP_ADDIU: begin u.alu_op = ALU_ADD;  u.b_imm = 1'b1; u.imm = simm; u.rd = rt; u.reg_write = 1'b1; end
      OP_SLTI:  begin u.alu_op = ALU_SLT;  u.b_imm = 1'b1; u.imm = simm; u.rd = rt; u.reg_write = 1'b1; end
      OP_SLTIU: begin u.alu_op = ALU_SLTU; u.b_imm = 1'b1; u.imm = simm; u.rd = rt; u.reg_write = 1'b1; end
      OP_ANDI:  begin u.alu_op = ALU_AND;  u.b_imm = 1'b1; u.imm = zimm; u.rd = rt; u.reg_write = 1'b1; end
      OP_ORI:   begin u.alu_op = ALU_OR;   u.b_imm = 1'b1; u.imm = zimm; u.rd = rt; u.reg_write = 1'b1; end
      OP_XORI:  begin u.alu_op = ALU_XOR;  u.b_imm = 1'b1; u.imm = zimm; u.rd = rt; u.reg_write = 1'b1; end
      OP_LUI:   begin u.alu_op = ALU_LUI;  u.b_imm = 1'b1; u.imm = zimm; u.rd = rt; u.reg_write = 1'b1; end
      OP_LW:    begin u.b_imm = 1'b1; u.imm = simm; u.rd = rt; u.reg_write = 1'b1; u.mem_read = 1'b1; end
      OP_SW:    begin u.b_imm = 1'b1; u.imm = simm; u.mem_write = 1'b1; end
      OP_BEQ:   begin u.alu_op = ALU_SUB; u.branch = BR_EQ; u.imm = simm; end
      OP_BNE:   begin u.alu_op = ALU_SUB; u.branch = BR_NE; u.imm = simm; end
      OP_J:     u.jump = 1'b1;
      OP_JAL:   begin u.jump = 1'b1; u.link = 1'b1; u.rd = 5'd31; u.reg_write = 1'b1; end
      default:  u.valid = 1'b0;
    endcase

    // Control flow has no parallel form.
    if (par && (u.branch != BR_NONE || u.jump || u.jump_reg || u.halt)) u = '0;
  end
endmodule
