// tb_divider: signed and unsigned divides of corner and random operands,
// including division by zero and the most negative dividend, compared with
// SystemVerilog's own / and %. Also checks that the result is ready exactly
// DIV_CYCLES cycles after the start cycle.
module tb_divider;
  import simd_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, sgn = 0, busy;
  word_t a = 0, b = 0, q, r;
  int checks = 0, failures = 0;

  divider dut (.*);
  always #5 clk = ~clk;

  task automatic one(word_t x, word_t y, bit s);
    word_t eq, er;
    int cyc = 0;
    @(negedge clk); a = x; b = y; sgn = s; start = 1;
    @(negedge clk); start = 0; a = $urandom; b = $urandom;  // operands may change
    while (busy) begin @(negedge clk); cyc++; end
    if (y == 0) begin eq = '1; er = x; end
    else if (s) begin
      longint sx = longint'($signed(x)), sy = longint'($signed(y));
      eq = word_t'(sx / sy); er = word_t'(sx % sy);
    end else begin eq = x / y; er = x % y; end
    checks += 2;
    if (q !== eq || r !== er) begin
      failures++; $display("FAIL %s %h / %h: q=%h r=%h exp %h %h", s ? "div" : "divu", x, y, q, r, eq, er);
    end
    if (cyc != DIV_CYCLES) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t c [7] = '{0, 1, 7, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'hFFFF_FFF9};
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (c[i]) foreach (c[j]) begin one(c[i], c[j], 1); one(c[i], c[j], 0); end
    repeat (150) begin
      one($urandom, $urandom >> $urandom_range(31), 1);
      one($urandom, $urandom >> $urandom_range(31), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
