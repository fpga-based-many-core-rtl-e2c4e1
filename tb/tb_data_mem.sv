// tb_data_mem: fills a 256-byte memory, reads it back, overwrites random
// words and checks asynchronous read, byte-address decoding and wrap-around.
module tb_data_mem;
  import simd_pkg::*;
  localparam int BYTES = 256;
  logic clk = 0, we = 0;
  word_t addr, wdata, rdata;
  word_t shadow [BYTES/4];
  int checks = 0, failures = 0;

  data_mem #(.BYTES(BYTES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    addr = 0; wdata = 0;
    for (int i = 0; i < BYTES/4; i++) begin
      @(negedge clk); we = 1; addr = 4*i; wdata = 32'hA500_0000 + i; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < BYTES/4; i++) begin
      addr = 4*i + (i % 4); #1;   // low two bits ignored
      checks++; if (rdata !== shadow[i]) begin failures++; $display("FAIL rd %0d %h", i, rdata); end
    end
    repeat (1000) begin
      int k;
      @(negedge clk);
      k = $urandom_range(BYTES/4 - 1);
      we = 1; addr = 4*k; wdata = $urandom;
      @(posedge clk); #1; shadow[k] = wdata; we = 0;
      k = $urandom_range(BYTES/4 - 1);
      addr = 4*k + BYTES;  // wraps
      #1;
      checks++; if (rdata !== shadow[k]) begin failures++; $display("FAIL rnd %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
