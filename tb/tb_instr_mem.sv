// tb_instr_mem: loads a program image, then checks the one-cycle read
// latency of the fetch port and that rdata holds while en is low.
module tb_instr_mem;
  import simd_pkg::*;
  localparam int WORDS = 64;
  logic clk = 0, en = 0, we = 0;
  word_t raddr, rdata, waddr, wdata;
  int checks = 0, failures = 0;

  instr_mem #(.WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;

  function automatic word_t img(int i); return 32'hC0DE_0000 ^ (i * 32'h0101_0101); endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); we = 1; waddr = 4*i; wdata = img(i);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); en = 1; raddr = 4*((i*7) % WORDS);
      @(posedge clk); #1;
      checks++; if (rdata !== img((i*7) % WORDS)) begin failures++; $display("FAIL %0d", i); end
      // hold
      en = 0; raddr = 4*((i*7 + 1) % WORDS);
      @(posedge clk); #1;
      checks++; if (rdata !== img((i*7) % WORDS)) begin failures++; $display("FAIL hold %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
