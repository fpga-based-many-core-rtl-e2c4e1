// tb_global_noc: exercises the five NoC modes on a 6-PE network.
//   mode 0: random permutations PE->PE, one cycle, no stall
//   mode 1: ACU word to a chosen PE
//   mode 4: PEs post words, ACU reads each
//   mode 2: random subsets of PEs send to the output device, with and
//           without device back-pressure; order, PE numbers, data and the
//           hold length (words + 1 cycles when the device never waits)
//   mode 3: random subsets receive from the input device stream
module tb_global_noc;
  import simd_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst_n = 0;
  logic mode_we = 0; noc_mode_e mode_wdata, mode;
  logic [N-1:0] pe_send = '0, pe_recv = '0;
  logic [11:0] pe_peer [N]; word_t pe_wdata [N], pe_rx [N];
  logic acu_we = 0, acu_re = 0; logic [11:0] acu_peer = 0; word_t acu_wdata = 0, acu_rdata;
  logic out_valid, out_ready = 1; word_t out_data; logic [11:0] out_pe;
  logic in_valid = 0, in_ready; word_t in_data = 0; logic [11:0] in_pe;
  logic stall, conflict;
  int checks = 0, failures = 0;

  global_noc #(.N_PE(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic set_mode(noc_mode_e m);
    @(negedge clk); mode_we = 1; mode_wdata = m;
    @(posedge clk); #1; mode_we = 0;
    checks++; if (mode !== m) begin failures++; $display("FAIL mode"); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin pe_peer[i] = 0; pe_wdata[i] = 0; end
    mode_wdata = NOC_PE_PE;
    repeat (2) @(posedge clk); rst_n = 1;
    // ---- mode 0
    set_mode(NOC_PE_PE);
    repeat (20) begin
      int perm [N]; word_t w [N];
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      @(negedge clk);
      for (int i = 0; i < N; i++) begin w[i] = $urandom; pe_wdata[i] = w[i]; pe_peer[i] = 12'(perm[i]); end
      pe_send = '1; #1;
      checks++; if (stall || conflict) begin failures++; $display("FAIL m0 stall"); end
      @(posedge clk); #1; pe_send = '0;
      for (int i = 0; i < N; i++) begin
        checks++; if (pe_rx[perm[i]] !== w[i]) begin failures++; $display("FAIL m0 %0d", i); end
      end
    end
    // ---- mode 1
    set_mode(NOC_ACU_PE);
    for (int k = 0; k < N; k++) begin
      @(negedge clk); acu_we = 1; acu_peer = 12'(k); acu_wdata = 32'hACE0_0000 + k;
      @(posedge clk); #1; acu_we = 0;
      checks++; if (pe_rx[k] !== 32'hACE0_0000 + k) begin failures++; $display("FAIL m1 %0d", k); end
    end
    // ---- mode 4
    set_mode(NOC_PE_ACU);
    @(negedge clk);
    for (int i = 0; i < N; i++) pe_wdata[i] = 32'h4000_0000 + 3*i;
    pe_send = '1;
    @(posedge clk); #1; pe_send = '0;
    for (int k = 0; k < N; k++) begin
      acu_re = 1; acu_peer = 12'(k); #1;
      checks++; if (acu_rdata !== 32'h4000_0000 + 3*k) begin failures++; $display("FAIL m4 %0d", k); end
    end
    acu_re = 0;
    // ---- mode 2
    set_mode(NOC_PE_DEV);
    repeat (20) begin
      automatic logic [N-1:0] m = N'($urandom) | N'(1);
      automatic bit bp = $urandom % 2;
      automatic int cyc = 0, got = 0;
      @(negedge clk);
      for (int i = 0; i < N; i++) pe_wdata[i] = $urandom;
      pe_send = m;
      #1;
      while (stall) begin
        out_ready = bp ? 1'($urandom) : 1'b1; #1;
        if (out_valid && out_ready) begin
          // expect the got-th set bit of m
          automatic int want = -1, seen = 0;
          for (int i = 0; i < N; i++) if (m[i]) begin if (seen == got) want = i; seen++; end
          checks++;
          if (out_pe !== 12'(want) || out_data !== pe_wdata[want]) begin
            failures++; $display("FAIL m2 pe %0d want %0d", out_pe, want);
          end
          got++;
        end
        @(posedge clk); #1; cyc++;
      end
      @(posedge clk); #1; pe_send = '0; out_ready = 1;
      checks++; if (got != $countones(m)) begin failures++; $display("FAIL m2 count"); end
      if (!bp) begin
        checks++; if (cyc != $countones(m) + 1) begin failures++; $display("FAIL m2 cycles %0d", cyc); end
      end
    end
    // ---- mode 3
    set_mode(NOC_DEV_PE);
    repeat (20) begin
      automatic logic [N-1:0] m = N'($urandom) | N'(2);
      automatic word_t prev [N];
      automatic word_t seq = $urandom;
      automatic int n = 0;
      for (int i = 0; i < N; i++) prev[i] = pe_rx[i];
      @(negedge clk); pe_recv = m; #1;
      while (stall) begin
        in_valid = 1'($urandom); in_data = seq + n; #1;
        if (in_valid && in_ready) n++;
        @(posedge clk); #1;
      end
      in_valid = 0;
      @(posedge clk); #1; pe_recv = '0;
      begin
        automatic int k = 0;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (m[i]) begin
            if (pe_rx[i] !== seq + k) begin failures++; $display("FAIL m3 %0d", i); end
            k++;
          end else if (pe_rx[i] !== prev[i]) begin failures++; $display("FAIL m3 untouched %0d", i); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
