// tb_alu: checks every ALU operation on directed corner values and random
// operands against a reference written here.
module tb_alu;
  import simd_pkg::*;
  alu_op_e op;
  word_t a, b, y, exp_y;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y);

  function automatic word_t ref_alu(alu_op_e o, word_t x, word_t z);
    longint sx, sz;
    sx = longint'($signed(x)); sz = longint'($signed(z));
    case (o)
      ALU_ADD:  return word_t'(longint'(x) + longint'(z));
      ALU_SUB:  return word_t'(longint'(x) - longint'(z));
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~(x | z);
      ALU_SLT:  return (sx < sz) ? 1 : 0;
      ALU_SLTU: return (longint'(x) < longint'(z)) ? 1 : 0;
      ALU_SLL:  return word_t'(longint'(z) * (longint'(1) << x[4:0]));
      ALU_SRL:  return word_t'(longint'(z) / (longint'(1) << x[4:0]));
      ALU_SRA:  begin
        longint q = sz;
        for (int k = 0; k < int'(x[4:0]); k++) q = (q - ((q % 2 + 2) % 2)) / 2;
        return word_t'(q);
      end
      ALU_MUL:  return word_t'(longint'(x) * longint'(z));
      ALU_LUI:  return {z[15:0], 16'h0};
      default:  return '0;
    endcase
  endfunction

  task automatic check1(alu_op_e o, word_t x, word_t z);
    op = o; a = x; b = z; #1;
    exp_y = ref_alu(o, x, z);
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h", o.name(), x, z, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1234_5678};
    for (int o = 0; o <= int'(ALU_LUI); o++) begin
      foreach (corners[i]) foreach (corners[j]) check1(alu_op_e'(o), corners[i], corners[j]);
      repeat (200) check1(alu_op_e'(o), $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
