// tb_acu: runs a program on the ACU alone: a counted loop (BNE), a call and
// return (JAL/JR), multiply, data-memory store/load, OR-tree read at 0x9005,
// NoC mode write at 0x9003, a signed divide (1 + DIV_CYCLES hold cycles),
// NoC writes and a NoC read, one parallel
// instruction (must appear on the ACU/PE bus and leave ACU registers alone)
// and BREAK. Results leave through NoC writes and are compared with values
// computed here. The program runs twice: once free, once with random
// external stalls; the free run must take executed instructions + 2 per
// taken branch + 2 fill cycles, the stalled one exactly the stall cycles
// more.
module tb_acu;
  import simd_pkg::*;
  import simd_asm::*;
  logic clk = 0, rst_n = 0, prog_we = 0, stall_ext = 0, or_tree = 1;
  word_t prog_addr = 0, prog_data = 0, noc_wdata, noc_rdata;
  uinstr_t u_bus; logic hold, halted, noc_mode_we, noc_we, noc_re;
  noc_mode_e noc_mode_wdata; logic [11:0] noc_peer;
  int checks = 0, failures = 0;
  word_t prog [32];
  logic div_go;
  word_t outv [16];
  int par_seen, mode_seen, stalls;

  acu #(.IMEM_WORDS(64), .DMEM_BYTES(512)) dut (.*);
  always #5 clk = ~clk;

  assign noc_rdata = noc_re ? 32'h7700_0000 + 32'(noc_peer) : 32'hDEAD;

  always @(posedge clk) if (rst_n && !hold) begin
    if (noc_we) outv[noc_peer[3:0]] <= noc_wdata;
    if (u_bus.valid && u_bus.par) par_seen++;
    if (noc_mode_we) begin mode_seen++; checks++; if (noc_mode_wdata != NOC_DEV_PE) begin failures++; $display("FAIL mode val"); end end
  end

  task automatic run(bit with_stalls, output int cycles);
    rst_n = 0; par_seen = 0; mode_seen = 0; stalls = 0;
    foreach (outv[i]) outv[i] = 0;
    repeat (2) @(posedge clk);
    foreach (prog[i]) begin
      @(negedge clk); prog_we = 1; prog_addr = 4*i; prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0; rst_n = 1;
    cycles = 0;
    while (!halted && cycles < 2000) begin
      @(negedge clk);
      stall_ext = with_stalls ? ($urandom % 3 == 0) : 1'b0;
      // a stall that falls while the divider runs, or after the halt, costs
      // nothing extra
      if (stall_ext && !halted && int'(dut.div_state) != 1) stalls++;
      @(posedge clk); cycles++;
    end
    @(negedge clk); stall_ext = 0;
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int c0, c1;
    foreach (prog[i]) prog[i] = NOP();
    prog[0]  = ADDI(1, 0, 10);
    prog[1]  = ADDI(2, 0, 0);
    prog[2]  = ADD(2, 2, 1);          // loop
    prog[3]  = ADDI(1, 1, -1);
    prog[4]  = BNE(1, 0, -3);
    prog[5]  = SW(2, 16'h4001, 0);    // 55
    prog[6]  = JAL(20);
    prog[7]  = SW(3, 16'h4002, 0);    // 42
    prog[8]  = LW(4, 16'h9005, 0);    // OR tree (address sign-extends)
    prog[9]  = SW(4, 16'h4003, 0);
    prog[10] = ADDI(5, 0, 3);
    prog[11] = SW(5, 16'h9003, 0);    // NoC mode 3
    prog[12] = SW(2, 100, 0);
    prog[13] = LW(6, 100, 0);
    prog[14] = SW(6, 16'h4004, 0);    // 55 via memory
    prog[15] = LW(7, 16'h4005, 0);    // NoC read of peer 5
    prog[16] = PADDI(7, 0, 1);        // parallel: ACU's r7 untouched
    prog[17] = SW(7, 16'h4006, 0);
    prog[18] = BREAK();
    prog[19] = SW(0, 16'h4007, 0);    // never reached
    prog[20] = ADDI(8, 0, 7);         // subroutine
    prog[21] = ADDI(9, 0, -6);
    prog[22] = MUL(3, 8, 9);
    prog[23] = SUB(3, 0, 3);
    prog[24] = DIV(10, 3, 9);         // 42 / -6
    prog[25] = SW(10, 16'h4008, 0);
    prog[26] = JR(31);
    for (int pass = 0; pass < 2; pass++) begin
      int cyc;
      run(pass == 1, cyc);
      if (pass == 0) c0 = cyc; else c1 = cyc;
      checks += 8;
      if (outv[8] !== word_t'(-7)) begin failures++; $display("FAIL div %0d", $signed(outv[8])); end
      if (outv[1] !== 55) begin failures++; $display("FAIL loop %0d", outv[1]); end
      if (outv[2] !== 42) begin failures++; $display("FAIL call %0d", outv[2]); end
      if (outv[3] !== 1)  begin failures++; $display("FAIL or tree"); end
      if (outv[4] !== 55) begin failures++; $display("FAIL mem"); end
      if (outv[6] !== 32'h7700_0005) begin failures++; $display("FAIL noc read %h", outv[6]); end
      if (outv[7] !== 0)  begin failures++; $display("FAIL past break"); end
      if (par_seen != 1 || mode_seen != 1) begin failures++; $display("FAIL par/mode %0d %0d", par_seen, mode_seen); end
      if (pass == 1) begin
        checks++;
        if (c1 != c0 + stalls) begin failures++; $display("FAIL stalled cycles %0d vs %0d + %0d", c1, c0, stalls); end
      end
    end
    // executed: 2 + 3*10 + 14 (5..18 without 19) + 7 (sub) = 53 ; taken: 9 BNE + JAL + JR = 11
    // plus one divide holding the machine 1 + DIV_CYCLES cycles
    checks++;
    if (c0 != 53 + 2*11 + 2 + 1 + DIV_CYCLES) begin failures++; $display("FAIL cycles %0d", c0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
