// regfile: 32 x 32-bit register file of the ACU and of each PE.
//
// Two asynchronous read ports and one write port written on the rising clock
// edge. Register 0 always reads zero, as in MIPS. A read of the register being
// written in the same cycle returns the old value; the single execute stage
// never needs the new one before the next cycle. Reset clears all registers.
module regfile
  import simd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] ra1,
  input  logic [4:0] ra2,
  output word_t      rd1,
  output word_t      rd2,
  input  logic       we,
  input  logic [4:0] wa,
  input  word_t      wd
);
  word_t regs [1:31];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == 5'd0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == 5'd0) ? '0 : regs[ra2];
endmodule
