// tb_neigh_router: loads a word, then shifts from each direction in turn and
// checks that only the link of the selected direction is taken, that a
// missing link gives zero/invalid, and that the word holds when idle.
module tb_neigh_router;
  import simd_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, load_valid = 0, shift = 0;
  word_t load_data, data;
  dir_e dir;
  word_t [7:0] in_data;
  logic [7:0] in_valid, in_ok;
  logic valid;
  int checks = 0, failures = 0;

  neigh_router dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load_data = 0; dir = DIR_N; in_data = '0; in_valid = '0; in_ok = '1;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (200) begin
      automatic word_t w = $urandom;
      automatic int d = $urandom_range(7);
      @(negedge clk); load = 1; load_data = w; load_valid = 1;
      @(posedge clk); #1; load = 0;
      checks++; if (data !== w || !valid) begin failures++; $display("FAIL load"); end
      @(posedge clk); #1;
      checks++; if (data !== w) begin failures++; $display("FAIL hold"); end
      for (int k = 0; k < 8; k++) in_data[k] = 32'h1000 * (k + 1) + 32'($urandom_range(255));
      in_valid = 8'($urandom); in_ok = 8'($urandom) | 8'(1 << d);
      if ($urandom % 4 == 0) in_ok[d] = 1'b0;
      dir = dir_e'(d); shift = 1;
      @(posedge clk); #1; shift = 0;
      checks++;
      if (in_ok[d] ? (data !== in_data[d] || valid !== in_valid[d]) : (data !== 0 || valid))
        begin failures++; $display("FAIL shift d=%0d", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
