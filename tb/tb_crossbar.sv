// tb_crossbar: random permutations (every output must receive exactly the
// word addressed to it, no conflict), partial patterns, and a two-to-one
// pattern where the lower input must win and conflict must rise.
module tb_crossbar;
  import simd_pkg::*;
  localparam int NI = 9, NO = 8;
  logic [NI-1:0] req;
  logic [11:0]   dest [NI];
  word_t         din  [NI];
  logic [NO-1:0] vout;
  word_t         dout [NO];
  logic          conflict;
  int checks = 0, failures = 0;

  crossbar #(.N_IN(NI), .N_OUT(NO), .DW(12)) dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int perm [NO];
    repeat (300) begin
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      req = '0;
      for (int i = 0; i < NI; i++) begin
        din[i] = $urandom; dest[i] = 12'(NO + 3);
      end
      for (int i = 0; i < NO; i++) begin
        req[i] = ($urandom % 4) != 0; dest[i] = 12'(perm[i]);
      end
      #1;
      for (int i = 0; i < NO; i++) begin
        checks++;
        if (vout[perm[i]] !== req[i] || (req[i] && dout[perm[i]] !== din[i])) begin
          failures++; $display("FAIL in %0d -> %0d", i, perm[i]);
        end
      end
      checks++; if (conflict) begin failures++; $display("FAIL spurious conflict"); end
    end
    // inputs 8 and 3 both address output 5
    req = '0; req[8] = 1; req[3] = 1; dest[8] = 5; dest[3] = 5; din[8] = 32'h88; din[3] = 32'h33;
    #1;
    checks++; if (!(vout[5] && dout[5] == 32'h33 && conflict)) begin failures++; $display("FAIL conflict"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
