// tb_regfile: writes random values to random registers, compares both read
// ports with a shadow copy, and checks that register 0 stays zero.
module tb_regfile;
  import simd_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] ra1, ra2, wa;
  word_t rd1, rd2, wd;
  word_t shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // after reset every register reads zero
    for (int r = 0; r < 32; r++) begin
      ra1 = 5'(r); ra2 = 5'(31 - r); #1;
      checks++; if (rd1 !== 0 || rd2 !== 0) begin failures++; $display("FAIL reset r%0d", r); end
    end
    repeat (2000) begin
      @(negedge clk);
      we = 1; wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = wa;
      #1;
      // same-cycle read sees the old value
      checks++; if (rd2 !== shadow[wa]) begin failures++; $display("FAIL old r%0d", wa); end
      @(posedge clk); #1;
      if (wa != 0) shadow[wa] = wd;
      we = 0;
      checks++; if (rd1 !== shadow[ra1]) begin failures++; $display("FAIL rd1 r%0d %h %h", ra1, rd1, shadow[ra1]); end
      checks++; if (rd2 !== shadow[ra2]) begin failures++; $display("FAIL rd2 r%0d %h %h", ra2, rd2, shadow[ra2]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
