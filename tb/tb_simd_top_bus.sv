// tb_simd_top_bus: the end-to-end program of tb_simd_top (same program,
// device models and output model) run on the system built with the shared
// bus inside the global NoC (NOC_NET = NET_BUS) instead of the crossbar, at
// 32 PEs on a 4 x 8 torus. The mode 0 step, in which the bright PEs all send
// to PE id+1, now has to pass one word per cycle: the NoC holds the machine
// for the extra passes. Besides every output word and the mechanisms counted
// by tb_simd_top, it checks that such multi-pass holds happened.
module tb_simd_top_bus;
  import simd_pkg::*;
  import simd_asm::*;
  localparam int N = 32, ROWS = 4, COLS = 8, FRAMES = 4;

  logic clk = 0, rst_n = 0, prog_we = 0;
  word_t prog_addr = 0, prog_data = 0;
  logic halted, busy_noc, busy_neigh, noc_conflict;
  logic [N-1:0] pe_active;
  logic out_valid, out_ready = 1, in_valid = 0, in_ready;
  word_t out_data, in_data;
  logic [11:0] out_pe, in_pe;
  int checks = 0, failures = 0;

  simd_top #(.NOC_NET(NET_BUS)) dut (.*);
  always #5 clk = ~clk;

  // ------------------------------------------------------------ program
  word_t prog [$];
  function automatic void emit(word_t w); prog.push_back(w); endfunction
  function automatic void acu_mode(int m);
    emit(ADDI(1, 0, m)); emit(SW(1, 16'h9003, 0));
  endfunction
  // PE r_dst = r_src * coef (through r5), added into r_acc when add = 1
  function automatic void pe_mac(int acc, int src, int coef, bit first);
    emit(PADDI(5, 0, coef));
    if (first) emit(PMUL(acc, src, 5));
    else begin emit(PMUL(6, src, 5)); emit(PADD(acc, acc, 6)); end
  endfunction

  int loop_at, skip_br;
  task automatic build();
    // PE setup: r2 = id, r3 = own status address, r4 = 1
    emit(PLUI(1, 2)); emit(PLW(2, 0, 1));
    emit(PLUI(3, 9)); emit(PADD(3, 3, 2));
    emit(PADDI(4, 0, 1));
    // ACU: r20 = frames, r21 = frame index, r22 = sum
    emit(ADDI(20, 0, FRAMES)); emit(ADDI(21, 0, 0)); emit(ADDI(22, 0, 0));
    loop_at = prog.size();
    acu_mode(3);
    emit(PLW(10, 16'h4000, 0));                          // pixel in
    emit(PSRA(11, 10, 16)); emit(PANDI(11, 11, 255));    // R
    emit(PSRA(12, 10, 8));  emit(PANDI(12, 12, 255));    // G
    emit(PANDI(13, 10, 255));                            // B
    pe_mac(14, 11, 306, 1); pe_mac(14, 12, 601, 0); pe_mac(14, 13, 117, 0); emit(PSRA(14, 14, 10));
    pe_mac(15, 11, 610, 1); pe_mac(15, 12, -282, 0); pe_mac(15, 13, -329, 0); emit(PSRA(15, 15, 10));
    pe_mac(16, 11, 217, 1); pe_mac(16, 12, -536, 0); pe_mac(16, 13, 318, 0); emit(PSRA(16, 16, 10));
    acu_mode(2);
    emit(PSW(14, 16'h4000, 0)); emit(PSW(15, 16'h4000, 0)); emit(PSW(16, 16'h4000, 0));
    // sharpen
    emit(PADDI(5, 0, 5)); emit(PMUL(18, 14, 5));
    for (int d = 0; d < 4; d++) begin
      emit(PSW(14, 16'h6000 + 16 * d + 1, 0)); emit(PLW(17, 16'h6000 + 16 * d + 1, 0));
      emit(PSUB(18, 18, 17));
    end
    emit(PSW(14, 16'h6000 + 16 * int'(DIR_E) + 2, 0)); emit(PLW(19, 16'h6000 + 16 * int'(DIR_E) + 2, 0));
    emit(PSW(18, 16'h4000, 0)); emit(PSW(19, 16'h4000, 0));
    // sharpened value divided by id + 1 (parallel signed divide)
    emit(PADDI(23, 2, 1)); emit(PDIV(23, 18, 23)); emit(PSW(23, 16'h4000, 0));
    // conditional activity
    emit(PSLTI(7, 14, 128)); emit(PSUB(7, 4, 7)); emit(PSW(7, 0, 3));
    emit(LW(2, 16'h9005, 0));                            // OR tree
    skip_br = prog.size();
    emit(BEQ(2, 0, 0));                                  // patched below
    acu_mode(0);
    emit(PADDI(8, 2, 1)); emit(PANDI(8, 8, N - 1)); emit(PADDI(8, 8, 16'h4000));
    emit(PSW(14, 0, 8));                                 // Y -> PE id+1
    prog[skip_br] = BEQ(2, 0, prog.size() - skip_br - 1);
    emit(PSW(4, 0, 3));                                  // re-enable all
    acu_mode(1);
    emit(SLL(9, 2, 8)); emit(ADD(9, 9, 21)); emit(SW(9, 16'h4003, 0));
    emit(PLW(9, 16'h4000, 0));
    acu_mode(2); emit(PSW(9, 16'h4000, 0));
    acu_mode(4); emit(PSW(14, 16'h4000, 0));
    emit(LW(7, 16'h4000 + N - 1, 0)); emit(ADD(22, 22, 7));
    emit(ADDI(21, 21, 1));
    emit(BNE(21, 20, loop_at - prog.size() - 1));
    acu_mode(1); emit(SW(22, 16'h4000, 0));
    emit(PLW(9, 16'h4000, 0));
    acu_mode(2); emit(PSW(9, 16'h4000, 0));
    emit(BREAK());
  endtask

  // ------------------------------------------------------------- model
  word_t pix [FRAMES][N];
  word_t expq [$];
  task automatic model();
    int y [N], rx [N], sum;
    bit any;
    foreach (rx[i]) rx[i] = 0;
    sum = 0;
    for (int f = 0; f < FRAMES; f++) begin
      int r, g, b, yi [N], ii [N], qi [N], sh [N];
      for (int p = 0; p < N; p++) begin
        rx[p] = pix[f][p];   // device words land in the same receive register
        r = pix[f][p][23:16]; g = pix[f][p][15:8]; b = pix[f][p][7:0];
        yi[p] = (306 * r + 601 * g + 117 * b) >>> 10;
        ii[p] = (610 * r - 282 * g - 329 * b) >>> 10;
        qi[p] = (217 * r - 536 * g + 318 * b) >>> 10;
      end
      foreach (yi[p]) expq.push_back(yi[p]);
      foreach (ii[p]) expq.push_back(ii[p]);
      foreach (qi[p]) expq.push_back(qi[p]);
      for (int p = 0; p < N; p++) begin
        int rr = p / COLS, cc = p % COLS;
        int up = ((rr + 1) % ROWS) * COLS + cc, dn = ((rr + ROWS - 1) % ROWS) * COLS + cc;
        int lf = rr * COLS + (cc + COLS - 1) % COLS, rt = rr * COLS + (cc + 1) % COLS;
        // a word sent north arrives from the PE below, and so on
        sh[p] = 5 * yi[p] - yi[up] - yi[lf] - yi[dn] - yi[rt];
        expq.push_back(sh[p]);
      end
      for (int p = 0; p < N; p++) expq.push_back(yi[(p / COLS) * COLS + (p % COLS + COLS - 2) % COLS]);
      for (int p = 0; p < N; p++) expq.push_back(sh[p] / (p + 1));
      any = 0;
      foreach (yi[p]) if (yi[p] >= 128) any = 1;
      if (any) for (int p = 0; p < N; p++) if (yi[p] >= 128) rx[(p + 1) % N] = yi[p];
      rx[3] = (int'(any) << 8) + f;
      foreach (rx[p]) expq.push_back(rx[p]);
      sum += yi[N - 1];
    end
    rx[0] = sum;
    foreach (rx[p]) expq.push_back(rx[p]);
  endtask

  // ------------------------------------------------------- device models
  int in_cnt = 0, out_cnt = 0;
  int n_in = 0, n_out = 0, n_bp = 0, n_nb = 0, n_multihop = 0, n_m0 = 0, n_m1 = 0, n_m4 = 0,
      n_alloff = 0, n_partial = 0, n_branch = 0, cycles = 0, n_in_wait = 0, n_div = 0, n_netw = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (in_valid && in_ready) begin
      n_in++;
      checks++;
      if (in_pe !== 12'(in_cnt % N)) begin failures++; $display("FAIL in_pe %0d", in_pe); end
      in_cnt++;
    end
    if (out_valid && out_ready) begin
      n_out++;
      checks++;
      if (out_cnt >= expq.size() || out_data !== expq[out_cnt] || out_pe !== 12'(out_cnt % N)) begin
        failures++;
        if (failures < 20) $display("FAIL out #%0d pe %0d: %0d exp %0d", out_cnt, out_pe,
                                    $signed(out_data), $signed(expq[out_cnt]));
      end
      out_cnt++;
    end
    if (out_valid && !out_ready) n_bp++;
    if (in_ready && !in_valid) n_in_wait++;
    if (dut.u_nb.state == 2'd1 && dut.u_nb.cnt == 4'd2) n_multihop++;
    if (busy_neigh && dut.u_nb.state == 2'd0) n_nb++;
    if (!dut.hold && dut.u_noc.mode == NOC_PE_PE && |dut.noc_send) n_m0++;
    if (!dut.hold && dut.u_acu.noc_we && dut.u_noc.mode == NOC_ACU_PE) n_m1++;
    if (!dut.hold && dut.u_acu.noc_re && dut.u_noc.mode == NOC_PE_ACU) n_m4++;
    if (pe_active == '0) n_alloff++;
    if (pe_active != '0 && pe_active != '1) n_partial++;
    if (dut.u_acu.flush && !dut.hold) n_branch++;
    if (dut.div_go) n_div++;
    if (int'(dut.u_noc.state) == 2) n_netw++;   // retry pass of the bus
    checks++; if (noc_conflict) begin failures++; $display("FAIL crossbar conflict"); end
  end
  always @(negedge clk) in_data <= pix[(in_cnt / N) % FRAMES][in_cnt % N];
  always @(negedge clk) begin
    out_ready <= ($urandom % 4) != 0;
    in_valid  <= ($urandom % 5) != 0;
  end

  initial begin
    #5000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int p = 0; p < N; p++)
        pix[f][p] = (f == 1) ? {8'h0, 8'($urandom_range(60)), 8'($urandom_range(60)), 8'($urandom_range(60))}
                             : {8'h0, 24'($urandom)};
    build();
    model();
    repeat (2) @(posedge clk);
    foreach (prog[i]) begin
      @(negedge clk); prog_we = 1; prog_addr = 4 * i; prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0;
    rst_n = 1;
    wait (halted);
    repeat (5) @(posedge clk);
    checks++;
    if (out_cnt != expq.size()) begin failures++; $display("FAIL %0d words out, expected %0d", out_cnt, expq.size()); end
    checks++;
    if (in_cnt != FRAMES * N) begin failures++; $display("FAIL %0d words in", in_cnt); end
    $display("program %0d instructions, %0d cycles, %0d cycles per pixel", prog.size(), cycles, cycles / (FRAMES * N));
    $display("mechanisms: dev-in %0d, dev-out %0d, out back-pressure %0d, in wait %0d, neighbour sends %0d, multi-hop %0d",
             n_in, n_out, n_bp, n_in_wait, n_nb, n_multihop);
    $display("            mode0 %0d, mode1 %0d, mode4 %0d, all-PEs-off cycles %0d, partial-activity cycles %0d, taken branches %0d, divides %0d",
             n_m0, n_m1, n_m4, n_alloff, n_partial, n_branch, n_div);
    if (n_in == 0)       begin failures++; $display("FAIL never: device in"); end
    if (n_out == 0)      begin failures++; $display("FAIL never: device out"); end
    if (n_bp == 0)       begin failures++; $display("FAIL never: back-pressure"); end
    if (n_nb == 0)       begin failures++; $display("FAIL never: neighbour"); end
    if (n_multihop == 0) begin failures++; $display("FAIL never: multi-hop"); end
    if (n_m0 == 0)       begin failures++; $display("FAIL never: mode 0"); end
    if (n_m1 == 0)       begin failures++; $display("FAIL never: mode 1"); end
    if (n_m4 == 0)       begin failures++; $display("FAIL never: mode 4"); end
    if (n_alloff == 0)   begin failures++; $display("FAIL never: all PEs disabled"); end
    if (n_partial == 0)  begin failures++; $display("FAIL never: partial activity"); end
    if (n_branch == 0)   begin failures++; $display("FAIL never: taken branch"); end
    if (n_div != FRAMES) begin failures++; $display("FAIL divides %0d", n_div); end
    if (n_netw == 0) begin failures++; $display("FAIL never: bus retry"); end
    $display("bus retry cycles %0d", n_netw);
    checks += 13;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
