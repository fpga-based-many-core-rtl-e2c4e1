// tb_delta_net: random request patterns on an 8-port and a 32-port Omega
// network. The expected outcome is worked out independently: sources are
// routed one by one in increasing order, each following its shuffle-exchange
// path and claiming the switch output it needs at every stage; a source that
// finds an output already claimed is blocked. Checks grant, vout and dout
// for every port, that a full identity permutation and a one-hot request
// always pass, and that blocking does occur.
module tb_delta_net;
  import simd_pkg::*;
  int checks = 0, failures = 0, blocked = 0;

  task automatic model(int n, logic [31:0] req, int dest [], output logic [31:0] grant,
                       output int at []);
    int s_n = $clog2(n);
    bit used [int];
    grant = '0;
    at = new [n];
    foreach (at[i]) at[i] = -1;
    for (int i = 0; i < n; i++) if (req[i]) begin
      int pos = i; bit ok = 1;
      for (int s = 0; s < s_n && ok; s++) begin
        pos = ((pos << 1) | (pos >> (s_n - 1))) & (n - 1);          // shuffle
        pos = (pos & ~1) | ((dest[i] >> (s_n - 1 - s)) & 1);         // exchange
        if (used.exists(s * n + pos)) ok = 0; else used[s * n + pos] = 1;
      end
      if (ok) begin grant[i] = 1; at[pos] = i; end
    end
  endtask

  // 8-port instance
  logic [7:0] r8, g8, v8; logic [2:0] d8 [8]; word_t i8 [8], o8 [8];
  delta_net #(.N(8)) u8 (.req(r8), .dest(d8), .din(i8), .grant(g8), .vout(v8), .dout(o8));
  // 32-port instance
  logic [31:0] r32, g32, v32; logic [4:0] d32 [32]; word_t i32 [32], o32 [32];
  delta_net #(.N(32)) u32 (.req(r32), .dest(d32), .din(i32), .grant(g32), .vout(v32), .dout(o32));

  task automatic run(int n, int kind);
    int dest [] = new [n];
    int at [];
    int perm [$];
    logic [31:0] req, eg;
    for (int i = 0; i < n; i++) perm.push_back(i);
    perm.shuffle();
    req = '0;
    for (int i = 0; i < n; i++) begin
      dest[i] = (kind == 1) ? i : (kind == 2) ? perm[i] : $urandom_range(n - 1);
      req[i]  = (kind == 1) ? 1'b1 : (kind == 3) ? (i == perm[0]) : ($urandom % 4 != 0);
    end
    if (n == 8) begin
      r8 = req[7:0];
      for (int i = 0; i < 8; i++) begin d8[i] = 3'(dest[i]); i8[i] = 32'h100 * i + dest[i]; end
    end else begin
      r32 = req;
      for (int i = 0; i < 32; i++) begin d32[i] = 5'(dest[i]); i32[i] = 32'h100 * i + dest[i]; end
    end
    #1;
    model(n, req, dest, eg, at);
    if (eg != req) blocked++;
    for (int p = 0; p < n; p++) begin
      logic g = (n == 8) ? g8[p] : g32[p];
      logic v = (n == 8) ? v8[p] : v32[p];
      word_t o = (n == 8) ? o8[p] : o32[p];
      checks += 2;
      if (g !== eg[p]) begin failures++; $display("FAIL n%0d grant %0d", n, p); end
      if (v !== (at[p] >= 0) || (v && o !== 32'h100 * at[p] + p)) begin
        failures++; $display("FAIL n%0d port %0d v%0d %h from %0d", n, p, v, o, at[p]);
      end
      if (kind == 1 || kind == 3) begin
        checks++; if (g !== req[p]) begin failures++; $display("FAIL n%0d kind %0d must pass", n, kind); end
      end
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 1; k <= 3; k++) begin run(8, k); run(32, k); end
    repeat (300) begin run(8, 0); run(8, 2); run(32, 0); run(32, 2); end
    checks++; if (blocked == 0) begin failures++; $display("FAIL never blocked"); end
    $display("patterns with blocking: %0d", blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
