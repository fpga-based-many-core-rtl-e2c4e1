// alu: combinational arithmetic/logic unit of the ACU and of every PE.
//
// Operations are those of the MIPS-I subset used by the SIMD system: add, sub,
// and/or/xor/nor, signed and unsigned set-less-than, the three shifts (B is
// shifted by A[4:0]), a 32x32 multiply that keeps the low word, and LUI (B
// moved to the upper half). Adds and subtracts wrap; no overflow trap.
// Divides take many cycles and are done by the separate divider module.
// Purely combinational: the result is valid in the same cycle.
module alu
  import simd_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'b0, a < b};
      ALU_SLL:  y = b << a[4:0];
      ALU_SRL:  y = b >> a[4:0];
      ALU_SRA:  y = word_t'($signed(b) >>> a[4:0]);
      ALU_MUL:  y = a * b;
      ALU_LUI:  y = {b[15:0], 16'b0};
      default:  y = '0;
    endcase
  end
endmodule
