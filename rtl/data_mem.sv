// data_mem: word-organised data memory, used as the ACU data memory (ACUData)
// and as each PE's private memory (PEM).
//
// BYTES sets the size (the design's size parameter); accesses are whole
// 32-bit words at byte addresses, the two low address bits ignored, and an
// address past the end wraps. Read is asynchronous so that the single execute
// stage loads in one cycle; write happens on the rising edge when we is high.
// The contents are not reset (a RAM); initialise before reading.
module data_mem
  import simd_pkg::*;
#(
  parameter int unsigned BYTES = 4096
) (
  input  logic  clk,
  input  word_t addr,
  input  logic  we,
  input  word_t wdata,
  output word_t rdata
);
  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1;

  word_t mem [WORDS];
  logic [AW-1:0] widx;

  always_comb begin
    widx = AW'(32'(addr[AW+1:2]) % WORDS);
  end

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= wdata;
  end

  assign rdata = mem[widx];
endmodule
