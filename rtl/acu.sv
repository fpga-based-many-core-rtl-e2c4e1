// acu: Array Controller Unit. A small MIPS-I subset processor that fetches
// the single instruction stream, decodes it, executes the sequential part
// itself and drives the decoded parallel part onto the ACU/PE bus.
//
// Pipeline, three stages:
//   IF  instruction memory (ACUIns) read, synchronous
//   ID  acu_decoder; the ID/EX register is the ACU/PE bus (u_bus)
//   EX  the ACU's own execute stage and, in the same cycle, every PE's
// Registers are read, computed and written back within EX, so no data hazard
// exists. Branches and jumps resolve in EX; when taken, the two younger
// instructions in IF and ID are squashed (two-cycle penalty, no delay slot).
// hold (an output, also fed to the PEs) freezes every stage: it is high while
// a network asks for more time (stall_ext), while a divide runs, or once
// BREAK has halted the ACU. A DIV/DIVU, sequential or parallel, holds the
// machine for 1 + DIV_CYCLES cycles: div_go starts the ACU's divider and,
// for a parallel divide, those of all active PEs; the instruction commits
// in the cycle after the hold.
//
// Sequential memory map (low 16 address bits decoded, so that the
// sign-extended addi constants of the instruction macros work):
//   0x9003 write   global NoC mode (SET_MODE_NOC)
//   0x9005 read    OR tree (GET_OR_TREE)
//   0x4000+k       NoC: write sends to PE k (mode 1), read takes PE k's word
//                  (mode 4)
//   other          ACU data memory (ACUData), DMEM_BYTES bytes
// The program is written into ACUIns through prog_* while rst_n is low or
// before it is released. Execution starts at address 0 after reset.
module acu
  import simd_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_BYTES = 4096
) (
  input  logic       clk,
  input  logic       rst_n,
  // program load
  input  logic       prog_we,
  input  word_t      prog_addr,
  input  word_t      prog_data,
  // ACU/PE bus
  output uinstr_t    u_bus,
  output logic       hold,
  output logic       div_go,
  input  logic       stall_ext,
  output logic       halted,
  // OR tree
  input  logic       or_tree,
  // global NoC
  output logic       noc_mode_we,
  output noc_mode_e  noc_mode_wdata,
  output logic       noc_we,
  output logic       noc_re,
  output logic [11:0] noc_peer,
  output word_t      noc_wdata,
  input  word_t      noc_rdata
);
  word_t   pc, id_pc, ex_pc, id_instr;
  logic    id_valid;
  uinstr_t id_u, ex_u;

  word_t rs_val, rt_val, a, b, alu_y, addr, dmem_rdata, load_data, wb_data;
  word_t pc4, target;
  logic  seq, taken, flush, is_mode, is_or, is_noc;

  typedef enum logic [1:0] {D_IDLE, D_RUN, D_DONE} div_state_e;
  div_state_e div_state;
  logic [5:0] div_cnt;
  logic       ex_div, hold_div;
  word_t      div_q, div_r;
  logic       div_busy;

  assign ex_div   = ex_u.valid && ex_u.div;
  assign div_go   = div_state == D_IDLE && ex_div && !stall_ext && !halted;
  assign hold_div = (div_state == D_IDLE && ex_div) || div_state == D_RUN;
  assign hold     = stall_ext || halted || hold_div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_state <= D_IDLE;
      div_cnt   <= '0;
    end else begin
      unique case (div_state)
        D_IDLE: if (div_go) begin
          div_state <= D_RUN;
          div_cnt   <= 6'(DIV_CYCLES - 1);
        end
        D_RUN: begin
          div_cnt <= div_cnt - 6'd1;
          if (div_cnt == 0) div_state <= D_DONE;
        end
        // the commit cycle may itself be stalled; wait for it to go through
        default: if (!stall_ext && !halted) div_state <= D_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------ IF
  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .en(!hold), .raddr(pc), .rdata(id_instr),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      id_pc    <= '0;
      id_valid <= 1'b0;
    end else if (!hold) begin
      id_pc    <= pc;
      id_valid <= !flush;
      pc       <= flush ? target : pc + 32'd4;
    end
  end

  // ------------------------------------------------------------------ ID
  acu_decoder u_dec (.valid(id_valid), .instr(id_instr), .u(id_u));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_u  <= '0;
      ex_pc <= '0;
    end else if (!hold) begin
      ex_u  <= flush ? '0 : id_u;
      ex_pc <= id_pc;
    end
  end

  assign u_bus = ex_u;

  // ------------------------------------------------------------------ EX
  regfile u_rf (
    .clk, .rst_n,
    .ra1(ex_u.rs), .ra2(ex_u.rt), .rd1(rs_val), .rd2(rt_val),
    .we(seq && ex_u.reg_write), .wa(ex_u.rd), .wd(wb_data)
  );

  assign a = ex_u.a_shamt ? ex_u.imm : rs_val;
  assign b = ex_u.b_imm   ? ex_u.imm : rt_val;
  alu u_alu (.op(ex_u.alu_op), .a, .b, .y(alu_y));

  assign seq     = ex_u.valid && !ex_u.par && !hold;
  assign addr    = rs_val + ex_u.imm;
  assign is_mode = addr[15:0] == ACU_NOC_MODE_ADDR;
  assign is_or   = addr[15:0] == ACU_OR_TREE_ADDR;
  assign is_noc  = addr[15:12] == NOC_WIN;

  data_mem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .addr, .we(seq && ex_u.mem_write && !is_mode && !is_or && !is_noc),
    .wdata(rt_val), .rdata(dmem_rdata)
  );

  always_comb begin
    if (is_or)       load_data = word_t'(or_tree);
    else if (is_noc) load_data = noc_rdata;
    else             load_data = dmem_rdata;
  end

  assign pc4 = ex_pc + 32'd4;
  always_comb begin
    taken  = 1'b0;
    target = pc4 + (ex_u.imm << 2);
    unique case (ex_u.branch)
      BR_EQ:   taken = rs_val == rt_val;
      BR_NE:   taken = rs_val != rt_val;
      default: taken = 1'b0;
    endcase
    if (ex_u.jump) begin
      taken  = 1'b1;
      target = {pc4[31:28], ex_u.jidx, 2'b00};
    end else if (ex_u.jump_reg) begin
      taken  = 1'b1;
      target = rs_val;
    end
  end
  assign flush = ex_u.valid && !ex_u.par && taken;

  divider u_div (
    .clk, .rst_n, .start(div_go && !ex_u.par), .sgn(ex_u.div_sgn),
    .a(rs_val), .b(rt_val), .q(div_q), .r(div_r), .busy(div_busy)
  );

  assign wb_data = ex_u.link ? pc4 : ex_u.mem_read ? load_data :
                   ex_u.div ? div_q : alu_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) halted <= 1'b0;
    else if (seq && ex_u.halt) halted <= 1'b1;
  end

  assign noc_mode_we    = seq && ex_u.mem_write && is_mode;
  assign noc_mode_wdata = noc_mode_e'(rt_val[2:0]);
  assign noc_we         = seq && ex_u.mem_write && is_noc;
  assign noc_re         = seq && ex_u.mem_read && is_noc;
  assign noc_peer       = addr[11:0];
  assign noc_wdata      = rt_val;
endmodule
