// simd_pkg: types and constants shared by the SIMD system-on-chip.
//
// The instruction set is a MIPS-I subset (the ACU and the reduced PEs derive
// from a MIPS-like core). Every arithmetic and memory instruction exists twice:
// a sequential form executed by the ACU and a parallel "p_" form executed by
// every active PE. The parallel opcodes are this design's own choice: the
// parallel I-type ALU operations reuse the sequential opcode with bits [5:4]
// set (0x08..0x0F -> 0x38..0x3F), P_SPECIAL (0x30) carries the R-type
// operations, and P_LW / P_SW are 0x31 / 0x32 (all unused in MIPS-I).
//
// Communication and system control are memory mapped, reached with LW/SW as
// the instruction macros of the design prescribe:
//   ACU  0x9003          SET_MODE_NOC: write selects the global NoC mode
//   ACU  0x9005          GET_OR_TREE : read returns the OR of all activity bits
//   ACU  0x4000 + k      global NoC port of PE k (mode 1 write, mode 4 read)
//   PE   0x0009_0000+id  P_SET_STATUS (write) / P_GET_STATUS (read)
//   PE   0x0002_0000     P_GET_IDENT: read returns the PE number
//   PE   0x4000 + k      P_NOC_SEND (write) / P_NOC_REC (read), k = dest/src
//   PE   0x6000 + dir + dis  P_REG_SEND / P_REG_REC, dir = d*16, dis = 1..15
// The window bases 0x4000 and 0x6000 and the dir/dis packing are this
// design's choice; 0x9003, 0x9005, 0x9xxxx and 0x20000 follow the macros.
package simd_pkg;

  localparam int unsigned XLEN = 32;
  localparam int unsigned DIV_CYCLES = 32;  // divider steps after its start cycle
  typedef logic [XLEN-1:0] word_t;

  // ---------------------------------------------------------------- opcodes
  localparam logic [5:0] OP_SPECIAL = 6'h00, OP_J    = 6'h02, OP_JAL  = 6'h03,
                         OP_BEQ     = 6'h04, OP_BNE  = 6'h05, OP_ADDI = 6'h08,
                         OP_ADDIU   = 6'h09, OP_SLTI = 6'h0A, OP_SLTIU= 6'h0B,
                         OP_ANDI    = 6'h0C, OP_ORI  = 6'h0D, OP_XORI = 6'h0E,
                         OP_LUI     = 6'h0F, OP_LW   = 6'h23, OP_SW   = 6'h2B,
                         OP_P_SPECIAL = 6'h30, OP_P_LW = 6'h31, OP_P_SW = 6'h32;

  localparam logic [5:0] F_SLL = 6'h00, F_SRL = 6'h02, F_SRA = 6'h03,
                         F_SLLV = 6'h04, F_SRLV = 6'h06, F_SRAV = 6'h07,
                         F_JR = 6'h08, F_JALR = 6'h09, F_BREAK = 6'h0D,
                         F_MUL = 6'h18, F_DIV = 6'h1A, F_DIVU = 6'h1B, F_ADD = 6'h20, F_ADDU = 6'h21,
                         F_SUB = 6'h22, F_SUBU = 6'h23, F_AND = 6'h24,
                         F_OR = 6'h25, F_XOR = 6'h26, F_NOR = 6'h27,
                         F_SLT = 6'h2A, F_SLTU = 6'h2B;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR, ALU_SLT, ALU_SLTU,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_MUL, ALU_LUI
  } alu_op_e;

  typedef enum logic [1:0] {BR_NONE, BR_EQ, BR_NE} branch_e;

  // Micro-instruction: what the ACU decode stage puts on the ACU/PE bus. The
  // ACU execute stage and every PE execute stage act on the same record.
  typedef struct packed {
    logic        valid;      // a real instruction (not a bubble)
    logic        par;        // parallel: executed by the PEs, not the ACU
    alu_op_e     alu_op;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  rd;         // destination register
    logic        b_imm;      // ALU operand B is imm instead of rt
    logic        a_shamt;    // ALU operand A is imm (shift amount) instead of rs
    word_t       imm;        // extended immediate / shift amount
    logic        reg_write;
    logic        mem_read;   // LW
    logic        mem_write;  // SW
    branch_e     branch;     // ACU only
    logic        jump;       // J / JAL (target in jidx)
    logic        jump_reg;   // JR / JALR
    logic        link;       // JAL / JALR write PC+4
    logic        halt;       // BREAK stops the ACU
    logic        div;        // DIV / DIVU: quotient from the divider
    logic        div_sgn;    // DIV (signed)
    logic [25:0] jidx;
  } uinstr_t;

  // ----------------------------------------------------- global NoC modes
  typedef enum logic [2:0] {
    NOC_PE_PE  = 3'd0,   // PE sends to PE dest
    NOC_ACU_PE = 3'd1,   // ACU sends to PE dest
    NOC_PE_DEV = 3'd2,   // every active PE sends one word to the output device
    NOC_DEV_PE = 3'd3,   // every active PE receives one word from the input device
    NOC_PE_ACU = 3'd4    // PEs post a word, ACU reads the one of PE src
  } noc_mode_e;

  // ------------------------------------------------- neighbourhood network
  typedef enum logic [2:0] {
    DIR_N, DIR_E, DIR_S, DIR_W, DIR_NE, DIR_NW, DIR_SE, DIR_SW
  } dir_e;

  typedef enum logic [2:0] {
    TOPO_LINEAR, TOPO_RING, TOPO_MESH, TOPO_TORUS, TOPO_XNET
  } topo_e;

  // interconnection network inside the global NoC
  typedef enum logic [1:0] {NET_CROSSBAR, NET_BUS, NET_DELTA} noc_net_e;

  // ---------------------------------------------------------- address map
  localparam logic [15:0] ACU_NOC_MODE_ADDR = 16'h9003;
  localparam logic [15:0] ACU_OR_TREE_ADDR  = 16'h9005;
  localparam logic [3:0]  NOC_WIN     = 4'h4;   // addr[15:12]
  localparam logic [3:0]  NEIGH_WIN   = 4'h6;   // addr[15:12]
  localparam logic [3:0]  STATUS_SEG  = 4'h9;   // addr[19:16]
  localparam logic [3:0]  IDENT_SEG   = 4'h2;   // addr[19:16]

  typedef enum logic [2:0] {
    REG_MEM, REG_NOC, REG_NEIGH, REG_STATUS, REG_IDENT
  } pe_region_e;

  function automatic pe_region_e pe_region(input word_t a);
    if (a[31:20] != '0)              return REG_MEM;
    if (a[19:16] == STATUS_SEG)      return REG_STATUS;
    if (a[19:16] == IDENT_SEG)       return REG_IDENT;
    if (a[19:16] != '0)              return REG_MEM;
    if (a[15:12] == NOC_WIN)         return REG_NOC;
    if (a[15:12] == NEIGH_WIN)       return REG_NEIGH;
    return REG_MEM;
  endfunction

endpackage
