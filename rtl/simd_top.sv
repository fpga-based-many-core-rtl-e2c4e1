// simd_top: SIMD many-core system-on-chip. One Array Controller Unit (ACU)
// runs a single instruction stream; parallel instructions are decoded once in
// the ACU and broadcast as micro-instructions over the ACU/PE bus to N_PE
// reduced PEs, each with a private data memory, which execute them in
// lockstep. PEs talk to each other through a regular neighbourhood network
// (neigh_net) and through a global crossbar NoC (global_noc) that also links
// the ACU and two I/O device streams. An OR tree over the PEs' activity bits
// tells the ACU whether any PE is still enabled.
//
// Timing: three-stage ACU pipeline (fetch, decode, execute); the ACU's and
// all PEs' execute stages share one cycle. Either network may hold the whole
// machine (multi-hop neighbour sends, device transfers, PE->PE words a bus or
// Omega network has to pass in several cycles), and so may a divide. halted rises after a
// BREAK instruction has executed.
//
// Defaults: 32 PEs of 2 KiB data memory, a 4 KiB ACU data memory and a
// 1024-instruction program memory, a crossbar NoC and a 2-D torus of 4 x 8
// PEs. NOC_NET swaps the crossbar for a shared bus or an Omega (Delta)
// network, which pass PE->PE words over several held cycles. The program is loaded through prog_* while rst_n is low. The input
// device (in_*) supplies words to PEs in NoC mode 3, the output device
// (out_*) takes words from PEs in mode 2; both carry the PE number.
module simd_top
  import simd_pkg::*;
#(
  parameter int unsigned N_PE           = 32,
  parameter int unsigned ROWS           = 4,
  parameter int unsigned COLS           = 8,
  parameter topo_e       TOPO           = TOPO_TORUS,
  parameter noc_net_e    NOC_NET        = NET_CROSSBAR,
  parameter int unsigned IMEM_WORDS     = 1024,
  parameter int unsigned ACU_DMEM_BYTES = 4096,
  parameter int unsigned PE_DMEM_BYTES  = 2048
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            prog_we,
  input  word_t           prog_addr,
  input  word_t           prog_data,
  output logic            halted,
  output logic [N_PE-1:0] pe_active,
  output logic            busy_noc,
  output logic            busy_neigh,
  output logic            noc_conflict,
  output logic            out_valid,
  input  logic            out_ready,
  output word_t           out_data,
  output logic [11:0]     out_pe,
  input  logic            in_valid,
  output logic            in_ready,
  input  word_t           in_data,
  output logic [11:0]     in_pe
);
  uinstr_t   u_bus;
  logic      hold, div_go, stall_noc, stall_nb, any_active;
  logic      mode_we, acu_noc_we, acu_noc_re;
  noc_mode_e mode_wdata, mode;
  logic [11:0] acu_peer;
  word_t     acu_wdata, acu_rdata;

  logic [N_PE-1:0] noc_send, noc_recv, nb_send, nb_recv, nb_valid;
  logic [11:0]     noc_peer [N_PE];
  word_t           noc_wdata[N_PE], noc_rx[N_PE], nb_wdata[N_PE], nb_rx[N_PE];
  dir_e            nb_dir [N_PE];
  logic [3:0]      nb_dis [N_PE];

  acu #(.IMEM_WORDS(IMEM_WORDS), .DMEM_BYTES(ACU_DMEM_BYTES)) u_acu (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data,
    .u_bus, .hold, .div_go, .stall_ext(stall_noc || stall_nb), .halted,
    .or_tree(any_active),
    .noc_mode_we(mode_we), .noc_mode_wdata(mode_wdata),
    .noc_we(acu_noc_we), .noc_re(acu_noc_re), .noc_peer(acu_peer),
    .noc_wdata(acu_wdata), .noc_rdata(acu_rdata)
  );

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    pe #(.PE_ID(p), .N_PE(N_PE), .MEM_BYTES(PE_DMEM_BYTES)) u_pe (
      .clk, .rst_n, .u(u_bus), .hold, .div_go, .act_vec(pe_active),
      .active(pe_active[p]),
      .noc_send(noc_send[p]), .noc_recv(noc_recv[p]), .noc_peer(noc_peer[p]),
      .noc_wdata(noc_wdata[p]), .noc_rx_data(noc_rx[p]),
      .nb_send(nb_send[p]), .nb_recv(nb_recv[p]), .nb_dir(nb_dir[p]),
      .nb_dis(nb_dis[p]), .nb_wdata(nb_wdata[p]), .nb_rx_data(nb_rx[p])
    );
  end

  or_tree #(.N(N_PE)) u_or (.in(pe_active), .out(any_active));

  neigh_net #(.N_PE(N_PE), .ROWS(ROWS), .COLS(COLS), .TOPO(TOPO)) u_nb (
    .clk, .rst_n, .send(nb_send), .dir(nb_dir), .dis(nb_dis),
    .wdata(nb_wdata), .rx_data(nb_rx), .rx_valid(nb_valid), .stall(stall_nb)
  );

  global_noc #(.N_PE(N_PE), .NET(NOC_NET)) u_noc (
    .clk, .rst_n, .mode_we, .mode_wdata, .mode,
    .pe_send(noc_send), .pe_recv(noc_recv), .pe_peer(noc_peer),
    .pe_wdata(noc_wdata), .pe_rx(noc_rx),
    .acu_we(acu_noc_we), .acu_re(acu_noc_re), .acu_peer, .acu_wdata,
    .acu_rdata,
    .out_valid, .out_ready, .out_data, .out_pe,
    .in_valid, .in_ready, .in_data, .in_pe,
    .stall(stall_noc), .conflict(noc_conflict)
  );

  assign busy_noc   = stall_noc;
  assign busy_neigh = stall_nb;
endmodule
