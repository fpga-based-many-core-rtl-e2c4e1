// tb_pe: drives one reduced PE (number 5 of 8) with decoded parallel
// micro-instructions, one per cycle, and observes its registers through
// NoC-window stores. Checks arithmetic, local memory, P_GET_IDENT,
// P_GET_STATUS, P_SET_STATUS (own and other number, re-enabling), that a
// disabled PE does nothing, a parallel divide, that hold blocks commit, that sequential
// instructions are ignored, and the network request outputs and reads.
module tb_pe;
  import simd_pkg::*;
  import simd_asm::*;
  localparam int ID = 5, N = 8;
  logic clk = 0, rst_n = 0, hold = 0, div_go = 0;
  logic [N-1:0] act_vec;
  logic active, noc_send, noc_recv, nb_send, nb_recv;
  logic [11:0] noc_peer;
  word_t noc_wdata, noc_rx_data, nb_wdata, nb_rx_data, instr;
  dir_e nb_dir;
  logic [3:0] nb_dis;
  uinstr_t u, ud;
  logic dvalid = 0;
  int checks = 0, failures = 0;

  acu_decoder dec (.valid(dvalid), .instr, .u(ud));
  pe #(.PE_ID(ID), .N_PE(N), .MEM_BYTES(256)) dut (.*);
  always #5 clk = ~clk;

  task automatic issue(word_t w);
    @(negedge clk); dvalid = 1; instr = w; #1; u = ud;
    @(posedge clk); #1; u = '0;
  endtask

  // store register r to the NoC window and compare the word presented
  task automatic expect_reg(int r, word_t v, string what);
    @(negedge clk); dvalid = 1; instr = PSW(r, 16'h4003, 0); #1; u = ud; #1;
    checks++;
    if (!noc_send || noc_wdata !== v || noc_peer !== 12'h003) begin
      failures++; $display("FAIL %s: send=%b r%0d=%h exp %h", what, noc_send, r, noc_wdata, v);
    end
    @(posedge clk); #1; u = '0;
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    u = '0; instr = 0; act_vec = 8'b1010_0110; noc_rx_data = 32'hFEED_0001; nb_rx_data = 32'hBEEF_0002;
    repeat (2) @(posedge clk); rst_n = 1;
    checks++; if (!active) begin failures++; $display("FAIL reset active"); end
    issue(PADDI(1, 0, 1234));
    issue(PADDI(2, 0, -7));
    issue(PMUL(3, 1, 2));
    expect_reg(3, word_t'(-8638), "mul");
    issue(PSUB(4, 1, 2));
    expect_reg(4, 1241, "sub");
    issue(PSW(3, 64, 0));                 // memory
    issue(PLW(5, 60, 4 /*dummy*/));       // r5 = mem[r4+60] (some other word)
    issue(PLW(6, 64, 0));
    expect_reg(6, word_t'(-8638), "mem");
    issue(PLUI(7, 2)); issue(PLW(8, 0, 7));   // P_GET_IDENT
    expect_reg(8, ID, "ident");
    for (int k = 0; k < N; k++) begin       // P_GET_STATUS
      issue(PLUI(7, 9)); issue(PADDI(7, 7, k)); issue(PLW(9, 0, 7));
      expect_reg(9, word_t'(act_vec[k]), "get_status");
    end
    issue(PLW(10, 16'h4001, 0)); expect_reg(10, 32'hFEED_0001, "noc rx");
    issue(PLW(11, 16'h6013, 0)); expect_reg(11, 32'hBEEF_0002, "nb rx");
    // neighbour send request fields
    @(negedge clk); instr = PSW(1, 16'h6000 + 16'h30 + 4, 0); #1; u = ud; #1;
    checks++; if (!(nb_send && nb_dir == DIR_W && nb_dis == 4 && nb_wdata == 1234)) begin failures++; $display("FAIL nb send"); end
    @(posedge clk); #1; u = '0;
    @(negedge clk); instr = PLW(13, 16'h4007, 0); #1; u = ud; #1;
    checks++; if (!(noc_recv && noc_peer == 7 && !noc_send)) begin failures++; $display("FAIL noc recv req"); end
    @(posedge clk); #1; u = '0;
    // parallel divide: div_go on the first held cycle, DIV_CYCLES more held
    // cycles, commit on the next
    issue(PADDI(20, 0, -1000)); issue(PADDI(21, 0, 37));
    @(negedge clk); instr = PDIV(22, 20, 21); #1; u = ud; hold = 1; div_go = 1;
    @(posedge clk); #1; div_go = 0;
    repeat (DIV_CYCLES) @(posedge clk);
    #1; hold = 0;
    @(posedge clk); #1; u = '0;
    expect_reg(22, word_t'(-27), "pdiv");
    // hold: nothing commits
    @(negedge clk); instr = PADDI(1, 0, 99); #1; u = ud; hold = 1;
    @(posedge clk); #1; u = '0; hold = 0;
    expect_reg(1, 1234, "hold");
    // sequential instruction ignored
    issue(ADDI(1, 0, 77)); expect_reg(1, 1234, "seq ignored");
    // P_SET_STATUS of another PE: no effect
    issue(PLUI(7, 9)); issue(PADDI(7, 7, ID + 1)); issue(PADDI(12, 0, 0)); issue(PSW(12, 0, 7));
    checks++; if (!active) begin failures++; $display("FAIL other id"); end
    // own: disable
    issue(PLUI(7, 9)); issue(PADDI(7, 7, ID)); issue(PSW(12, 0, 7));
    checks++; if (active) begin failures++; $display("FAIL disable"); end
    issue(PADDI(1, 0, 55));     // ignored while disabled
    @(negedge clk); instr = PSW(1, 16'h4003, 0); #1; u = ud; #1;
    checks++; if (noc_send) begin failures++; $display("FAIL inactive sends"); end
    @(posedge clk); #1; u = '0;
    issue(PADDI(12, 0, 1)); // ignored: r12 stays 0 -> use r7 trick: store 1 needs a register holding 1
    issue(PSW(7, 0, 7));    // r7 = 0x90005: bit0 = 1 -> re-enable
    checks++; if (!active) begin failures++; $display("FAIL re-enable"); end
    expect_reg(1, 1234, "disabled did not write");
    expect_reg(12, 0, "disabled did not write r12");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
