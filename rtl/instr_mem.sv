// instr_mem: ACU instruction memory (ACUIns).
//
// WORDS 32-bit instructions. The fetch port is synchronous, like an FPGA
// block RAM: when en is high the word at byte address raddr appears on rdata
// after the next rising edge; when en is low rdata holds (used to stall the
// fetch stage). A separate write port loads the program before the run.
module instr_mem
  import simd_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic  clk,
  input  logic  en,
  input  word_t raddr,
  output word_t rdata,
  input  logic  we,
  input  word_t waddr,
  input  word_t wdata
);
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;
  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[AW'(32'(waddr[AW+1:2]) % WORDS)] <= wdata;
    if (en) rdata <= mem[AW'(32'(raddr[AW+1:2]) % WORDS)];
  end
endmodule
