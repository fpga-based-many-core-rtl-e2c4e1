// tb_or_tree: compares the tree output with a plain OR for all-zero,
// one-hot (every position) and random inputs, at N = 32 and at N = 5 (a
// size that is not a power of two).
module tb_or_tree;
  logic [31:0] in32; logic out32;
  logic [4:0]  in5;  logic out5;
  int checks = 0, failures = 0;

  or_tree #(.N(32)) dut32 (.in(in32), .out(out32));
  or_tree #(.N(5))  dut5  (.in(in5),  .out(out5));

  task automatic chk(logic [31:0] v32, logic [4:0] v5);
    in32 = v32; in5 = v5; #1;
    checks += 2;
    if (out32 !== (v32 != 0)) begin failures++; $display("FAIL32 %h", v32); end
    if (out5  !== (v5  != 0)) begin failures++; $display("FAIL5 %b", v5); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    chk(0, 0);
    for (int i = 0; i < 32; i++) chk(32'(1) << i, 5'(1 << (i % 5)));
    repeat (500) chk(($urandom % 3 == 0) ? 32'h0 : $urandom & $urandom & $urandom, 5'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
