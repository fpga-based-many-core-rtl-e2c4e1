// pe: reduced processing element. It is the execute stage of the ACU's core
// cut loose from fetch and decode: it receives an already decoded
// micro-instruction from the ACU/PE bus and executes it on its own register
// file and private data memory (PEM). It has no instruction memory.
//
// Each parallel micro-instruction (u.par=1) is executed in one cycle, at the
// rising edge where hold is low, and only if the PE's activity bit is set.
// The one exception is a P_SET_STATUS store (address 0x9xxxx), which every
// PE executes so that a disabled PE can be re-enabled: the PE whose number
// equals the low 16 address bits copies bit 0 of the stored word into its
// activity bit. Loads and stores are decoded by address (simd_pkg):
//   local memory, P_GET_IDENT (own number), P_GET_STATUS (activity bit of
//   the addressed PE, taken from act_vec), the global NoC window and the
//   neighbourhood window.
// Stores and loads in the two network windows are presented to the networks
// as requests (noc_*, nb_*) for as long as the instruction sits in execute;
// the networks answer through noc_rx_data / nb_rx_data and may hold the
// pipeline. A parallel DIV/DIVU starts the PE's divider on div_go; the ACU
// holds the machine until every divider has finished (see acu). Reset sets
// the activity bit (all PEs start enabled).
module pe
  import simd_pkg::*;
#(
  parameter int unsigned PE_ID     = 0,
  parameter int unsigned N_PE      = 32,
  parameter int unsigned MEM_BYTES = 2048
) (
  input  logic            clk,
  input  logic            rst_n,
  input  uinstr_t         u,          // ACU/PE bus
  input  logic            hold,       // pipeline held: do not commit
  input  logic            div_go,     // start of a divide (from the ACU)
  input  logic [N_PE-1:0] act_vec,    // activity bits of all PEs
  output logic            active,
  // global NoC
  output logic            noc_send,
  output logic            noc_recv,
  output logic [11:0]     noc_peer,   // dest (send) or src (receive)
  output word_t           noc_wdata,
  input  word_t           noc_rx_data,
  // neighbourhood network
  output logic            nb_send,
  output logic            nb_recv,
  output dir_e            nb_dir,
  output logic [3:0]      nb_dis,
  output word_t           nb_wdata,
  input  word_t           nb_rx_data
);
  localparam int PW = N_PE > 1 ? $clog2(N_PE) : 1;   // PE number width
  word_t rs_val, rt_val, a, b, alu_y, addr, mem_rdata, load_data;
  pe_region_e region;
  logic mine, status_wr, exec, commit;
  word_t div_q, div_r;
  logic  div_busy;

  regfile u_rf (
    .clk, .rst_n,
    .ra1(u.rs), .ra2(u.rt), .rd1(rs_val), .rd2(rt_val),
    .we(commit && u.reg_write), .wa(u.rd),
    .wd(u.mem_read ? load_data : u.div ? div_q : alu_y)
  );

  divider u_div (
    .clk, .rst_n, .start(div_go && exec), .sgn(u.div_sgn),
    .a(rs_val), .b(rt_val), .q(div_q), .r(div_r), .busy(div_busy)
  );

  assign a = u.a_shamt ? u.imm : rs_val;
  assign b = u.b_imm   ? u.imm : rt_val;

  alu u_alu (.op(u.alu_op), .a, .b, .y(alu_y));

  assign addr   = rs_val + u.imm;
  assign region = pe_region(addr);

  data_mem #(.BYTES(MEM_BYTES)) u_pem (
    .clk, .addr, .we(commit && u.mem_write && region == REG_MEM),
    .wdata(rt_val), .rdata(mem_rdata)
  );

  assign mine      = u.valid && u.par;
  assign status_wr = mine && u.mem_write && region == REG_STATUS;
  assign exec      = mine && active;
  assign commit    = exec && !hold;

  always_comb begin
    unique case (region)
      REG_NOC:    load_data = noc_rx_data;
      REG_NEIGH:  load_data = nb_rx_data;
      REG_STATUS: load_data = (32'(addr[15:0]) < N_PE) ?
                              word_t'(act_vec[PW'(addr[15:0] % 16'(N_PE))]) : '0;
      REG_IDENT:  load_data = word_t'(PE_ID);
      default:    load_data = mem_rdata;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) active <= 1'b1;
    else if (status_wr && !hold && 32'(addr[15:0]) == PE_ID) active <= rt_val[0];
  end

  // Network requests.
  assign noc_send  = exec && u.mem_write && region == REG_NOC;
  assign noc_recv  = exec && u.mem_read  && region == REG_NOC;
  assign noc_peer  = addr[11:0];
  assign noc_wdata = rt_val;
  assign nb_send   = exec && u.mem_write && region == REG_NEIGH;
  assign nb_recv   = exec && u.mem_read  && region == REG_NEIGH;
  assign nb_dir    = dir_e'(addr[6:4]);
  assign nb_dis    = addr[3:0];
  assign nb_wdata  = rt_val;
endmodule
