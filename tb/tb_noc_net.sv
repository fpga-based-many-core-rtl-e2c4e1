// tb_noc_net: PE->PE (mode 0) and ACU->PE (mode 1) transfers through the
// global NoC built with its two blocking interconnection networks, a shared
// bus and an Omega (Delta) network, each with 8 PEs (the Omega network also
// with 6 PEs, padded to 8 ports). Random subsets of PEs send to distinct
// destinations and keep their request up while stall is high, as the held
// pipeline does. Checks: every word reaches its destination's receive
// register; the bus takes one pass per word and the Omega network the number
// of passes given by an independent routing model (sources in increasing
// order, each claiming its path's switch outputs), the machine being held
// for passes + 1 cycles when more than one pass is needed and not at all
// otherwise; ACU words pass in one cycle. It fails if no multi-pass
// transfer ever happened.
module tb_noc_net;
  import simd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, multi = 0;

  // one bundle of stimulus signals per instance
  localparam int NI = 3;
  localparam int NS [NI] = '{8, 8, 6};
  logic mode_we = 0; noc_mode_e mode_wdata = NOC_PE_PE;
  noc_mode_e mode [NI];
  logic [7:0] send [NI];
  logic [11:0] peer [8]; word_t wdata [8];
  word_t rx_b [8], rx_d [8], rx_d6 [6];
  logic acu_we = 0; logic [11:0] acu_peer = 0; word_t acu_wdata = 0;
  word_t acu_rdata [NI];
  logic out_valid [NI], in_ready [NI]; word_t out_data [NI]; logic [11:0] out_pe [NI], in_pe [NI];
  logic stall [NI], conflict [NI];
  logic [11:0] peer6 [6]; word_t wdata6 [6];

  always_comb for (int i = 0; i < 6; i++) begin peer6[i] = peer[i]; wdata6[i] = wdata[i]; end

  global_noc #(.N_PE(8), .NET(NET_BUS)) u_bus (
    .clk, .rst_n, .mode_we, .mode_wdata, .mode(mode[0]),
    .pe_send(send[0]), .pe_recv('0), .pe_peer(peer), .pe_wdata(wdata), .pe_rx(rx_b),
    .acu_we, .acu_re(1'b0), .acu_peer, .acu_wdata, .acu_rdata(acu_rdata[0]),
    .out_valid(out_valid[0]), .out_ready(1'b1), .out_data(out_data[0]), .out_pe(out_pe[0]),
    .in_valid(1'b0), .in_ready(in_ready[0]), .in_data('0), .in_pe(in_pe[0]),
    .stall(stall[0]), .conflict(conflict[0]));
  global_noc #(.N_PE(8), .NET(NET_DELTA)) u_delta (
    .clk, .rst_n, .mode_we, .mode_wdata, .mode(mode[1]),
    .pe_send(send[1]), .pe_recv('0), .pe_peer(peer), .pe_wdata(wdata), .pe_rx(rx_d),
    .acu_we, .acu_re(1'b0), .acu_peer, .acu_wdata, .acu_rdata(acu_rdata[1]),
    .out_valid(out_valid[1]), .out_ready(1'b1), .out_data(out_data[1]), .out_pe(out_pe[1]),
    .in_valid(1'b0), .in_ready(in_ready[1]), .in_data('0), .in_pe(in_pe[1]),
    .stall(stall[1]), .conflict(conflict[1]));
  global_noc #(.N_PE(6), .NET(NET_DELTA)) u_delta6 (
    .clk, .rst_n, .mode_we, .mode_wdata, .mode(mode[2]),
    .pe_send(send[2][5:0]), .pe_recv('0), .pe_peer(peer6), .pe_wdata(wdata6), .pe_rx(rx_d6),
    .acu_we, .acu_re(1'b0), .acu_peer, .acu_wdata, .acu_rdata(acu_rdata[2]),
    .out_valid(out_valid[2]), .out_ready(1'b1), .out_data(out_data[2]), .out_pe(out_pe[2]),
    .in_valid(1'b0), .in_ready(in_ready[2]), .in_data('0), .in_pe(in_pe[2]),
    .stall(stall[2]), .conflict(conflict[2]));

  // passes an Omega network of 8 ports needs for a set of (source, dest)
  function automatic int omega_passes(logic [7:0] req, int dest [8]);
    int passes = 0;
    while (req != 0) begin
      bit used [int];
      logic [7:0] left;
      used.delete();
      left = req;
      for (int i = 0; i < 8; i++) if (req[i]) begin
        int pos = i; bit ok = 1;
        for (int s = 0; s < 3 && ok; s++) begin
          pos = ((pos << 1) | (pos >> 2)) & 7;
          pos = (pos & ~1) | ((dest[i] >> (2 - s)) & 1);
          if (used.exists(s * 8 + pos)) ok = 0; else used[s * 8 + pos] = 1;
        end
        if (ok) left[i] = 1'b0;
      end
      req = left;
      passes++;
    end
    return passes;
  endfunction

  task automatic set_mode(noc_mode_e m);
    @(negedge clk); mode_we = 1; mode_wdata = m;
    @(posedge clk); #1; mode_we = 0;
  endtask

  // one transfer: count the cycles until every instance has let it commit
  task automatic transfer(logic [7:0] snd, int dest [8], output int cyc [NI]);
    bit done [NI];
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin peer[i] = 12'(dest[i]); wdata[i] = 32'hD000 + 16 * i + dest[i]; end
    foreach (done[k]) begin done[k] = 0; cyc[k] = 0; send[k] = snd; end
    while (!(done[0] && done[1] && done[2])) begin
      #1;
      foreach (done[k]) if (!done[k]) begin cyc[k]++; if (!stall[k]) done[k] = 1; end
      @(posedge clk); @(negedge clk);
      // an instance that has committed moves on to the next instruction
      foreach (done[k]) if (done[k]) send[k] = '0;
      checks++; if (cyc[0] > 20 || cyc[1] > 20 || cyc[2] > 20) begin failures++; $display("FAIL transfer never ends"); break; end
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (peer[i]) begin peer[i] = 0; wdata[i] = 0; end
    foreach (send[k]) send[k] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    set_mode(NOC_PE_PE);
    for (int t = 0; t < 400; t++) begin
      automatic int perm [$];
      int dest [8], cyc [NI], k, pd, pd6;
      logic [7:0] snd;
      for (int i = 0; i < 8; i++) perm.push_back(i);
      perm.shuffle();
      snd = (t < 2) ? 8'hFF : 8'($urandom);
      if (t == 0) for (int i = 0; i < 8; i++) dest[i] = i;     // identity
      else for (int i = 0; i < 8; i++) dest[i] = perm[i];
      // the 6-PE instance sees only sources 0..5 with destinations below 6
      transfer(snd, dest, cyc);
      k = $countones(snd);
      pd = omega_passes(snd, dest);
      begin
        automatic logic [7:0] s6 = '0;
        for (int i = 0; i < 6; i++) if (snd[i] && dest[i] < 6) s6[i] = 1'b1;
        pd6 = omega_passes(s6, dest);
      end
      if (pd > 1) multi++;
      checks += 3;
      if (cyc[0] != ((k > 1) ? k + 1 : 1))   begin failures++; $display("FAIL bus cycles %0d for %0d words", cyc[0], k); end
      if (cyc[1] != ((pd > 1) ? pd + 1 : 1)) begin failures++; $display("FAIL omega cycles %0d, %0d passes", cyc[1], pd); end
      if (cyc[2] != ((pd6 > 1) ? pd6 + 1 : 1)) begin failures++; $display("FAIL omega6 cycles %0d, %0d passes", cyc[2], pd6); end
      if (t == 0) begin checks++; if (pd != 1) begin failures++; $display("FAIL identity blocked"); end end
      for (int i = 0; i < 8; i++) if (snd[i]) begin
        checks += 2;
        if (rx_b[dest[i]] !== 32'hD000 + 16 * i + dest[i]) begin failures++; $display("FAIL bus word %0d", i); end
        if (rx_d[dest[i]] !== 32'hD000 + 16 * i + dest[i]) begin failures++; $display("FAIL omega word %0d", i); end
        if (i < 6 && dest[i] < 6) begin
          checks++;
          if (rx_d6[dest[i]] !== 32'hD000 + 16 * i + dest[i]) begin failures++; $display("FAIL omega6 word %0d", i); end
        end
      end
    end
    // ACU -> PE: a single source, always one cycle
    set_mode(NOC_ACU_PE);
    for (int p = 0; p < 6; p++) begin
      @(negedge clk); acu_we = 1; acu_peer = 12'(p); acu_wdata = 32'hACE0 + p; #1;
      checks++; if (stall[0] || stall[1] || stall[2]) begin failures++; $display("FAIL acu stall"); end
      @(posedge clk); #1; acu_we = 0;
      checks += 3;
      if (rx_b[p] !== 32'hACE0 + p || rx_d[p] !== 32'hACE0 + p || rx_d6[p] !== 32'hACE0 + p) begin
        failures++; $display("FAIL acu word %0d", p);
      end
    end
    checks++; if (multi == 0) begin failures++; $display("FAIL never multi-pass"); end
    $display("omega transfers needing several passes: %0d", multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
