// tb_neigh_net: neighbourhood network in three topologies: a 4 x 8 torus, a
// 3 x 4 X-net (mesh with diagonals, no wrap) and a 6-PE ring. For random
// directions and distances it sends a random word from every PE, holds the
// send for as long as stall asks, then compares every PE's received word with
// the word of the PE dis hops back, computed here from grid coordinates
// (zero where the path leaves a non-wrapping array). The number of stall
// cycles must be dis + 1.
module tb_neigh_net;
  import simd_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // one harness per topology
  `define NB_HARNESS(NAME, NP, R, C, T)                                              \
  logic [NP-1:0] NAME``_send; dir_e NAME``_dir [NP]; logic [3:0] NAME``_dis [NP];    \
  word_t NAME``_wd [NP], NAME``_rx [NP]; logic [NP-1:0] NAME``_rv; logic NAME``_st;  \
  neigh_net #(.N_PE(NP), .ROWS(R), .COLS(C), .TOPO(T)) NAME (                        \
    .clk, .rst_n, .send(NAME``_send), .dir(NAME``_dir), .dis(NAME``_dis),            \
    .wdata(NAME``_wd), .rx_data(NAME``_rx), .rx_valid(NAME``_rv), .stall(NAME``_st));

  `NB_HARNESS(tor, 32, 4, 8, TOPO_TORUS)
  `NB_HARNESS(xn, 12, 3, 4, TOPO_XNET)
  `NB_HARNESS(rg, 6, 1, 6, TOPO_RING)

  function automatic void delta(dir_e d, output int dr, output int dc);
    dr = 0; dc = 0;
    case (d)
      DIR_N: dr = -1;  DIR_S: dr = 1;  DIR_E: dc = 1;  DIR_W: dc = -1;
      DIR_NE: begin dr = -1; dc = 1; end   DIR_NW: begin dr = -1; dc = -1; end
      DIR_SE: begin dr = 1;  dc = 1; end   default: begin dr = 1; dc = -1; end
    endcase
  endfunction

  // expected source of PE p after dis hops, -1 if none
  function automatic int exp_src(int p, int rows, int cols, bit wrap, bit diag, bit oned,
                                 dir_e d, int dis);
    int dr, dc, r, c;
    delta(d, dr, dc);
    if (oned) begin
      if (dr != 0) return -1;
      return ((p - dc * dis) % cols + cols) % cols;
    end
    if (!diag && dr != 0 && dc != 0) return -1;
    r = p / cols - dr * dis; c = p % cols - dc * dis;
    if (wrap) begin r = (r % rows + rows) % rows; c = (c % cols + cols) % cols; end
    else if (r < 0 || r >= rows || c < 0 || c >= cols) return -1;
    return r * cols + c;
  endfunction

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  `define NB_RUN(NAME, NP, R, C, WRAP, DIAG, ONED, DIRMAX)                          \
    repeat (40) begin                                                                \
      automatic dir_e d = dir_e'($urandom_range(DIRMAX)); automatic int ds = $urandom_range(1, 5);     \
      automatic int cyc = 0; word_t w [NP];                                              \
      for (int p = 0; p < NP; p++) begin                                             \
        w[p] = $urandom; NAME``_wd[p] = w[p]; NAME``_dir[p] = d; NAME``_dis[p] = 4'(ds); \
      end                                                                            \
      @(negedge clk); NAME``_send = '1;                                              \
      #1; while (NAME``_st) begin @(posedge clk); #1; cyc++; end                     \
      @(posedge clk); #1; NAME``_send = '0;                                          \
      checks++; if (cyc != ds + 1) begin failures++; $display("FAIL %s stall %0d ds %0d", `"NAME`", cyc, ds); end \
      for (int p = 0; p < NP; p++) begin                                             \
        automatic int s = exp_src(p, R, C, WRAP, DIAG, ONED, d, ds);                           \
        checks++;                                                                    \
        if ((s >= 0) ? (NAME``_rx[p] !== w[s] || !NAME``_rv[p]) : (NAME``_rx[p] !== 0 || NAME``_rv[p])) begin \
          failures++; $display("FAIL %s p=%0d d=%s ds=%0d got %h", `"NAME`", p, d.name(), ds, NAME``_rx[p]); \
        end                                                                          \
      end                                                                            \
    end

  initial begin
    tor_send = '0; xn_send = '0; rg_send = '0;
    for (int p = 0; p < 32; p++) begin tor_dir[p] = DIR_N; tor_dis[p] = 0; tor_wd[p] = 0; end
    for (int p = 0; p < 12; p++) begin xn_dir[p] = DIR_N; xn_dis[p] = 0; xn_wd[p] = 0; end
    for (int p = 0; p < 6; p++) begin rg_dir[p] = DIR_N; rg_dis[p] = 0; rg_wd[p] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    `NB_RUN(tor, 32, 4, 8, 1, 0, 0, 7)
    `NB_RUN(xn, 12, 3, 4, 0, 1, 0, 7)
    `NB_RUN(rg, 6, 1, 6, 1, 0, 1, 3)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
