// neigh_net: regular neighbourhood network. A controller plus one
// neigh_router per PE, wired as a linear array, ring, 2-D mesh, 2-D torus or
// X-net (mesh with diagonal links) according to TOPO. PE p sits at row
// p / COLS, column p % COLS; in the linear array and ring, E/W move along
// the PE numbers and the other directions have no link. North is the row
// above. Mesh, linear array and X-net have no wrap-around; ring and torus do.
//
// A P_REG_SEND(dir, dis) issued by the active PEs is executed as:
//   cycle 0       every router loads its PE's word (valid = PE sent)
//   cycles 1..dis all routers move their word one hop in direction dir
//   next cycle    hold released, the send instruction completes
// so the ACU and PEs are held for dis+1 cycles (dis = 0 only loads).
// Afterwards each router holds the word sent by the PE dis hops behind it
// (zero where the path leaves an array without wrap-around); P_REG_REC reads
// it in one cycle. dir and dis are taken from the lowest-numbered sending PE;
// in an SIMD program all PEs send the same way, which an assertion checks.
module neigh_net
  import simd_pkg::*;
#(
  parameter int unsigned N_PE = 32,
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 8,
  parameter topo_e       TOPO = TOPO_TORUS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_PE-1:0]  send,
  input  dir_e             dir  [N_PE],
  input  logic [3:0]       dis  [N_PE],
  input  word_t            wdata[N_PE],
  output word_t            rx_data [N_PE],
  output logic [N_PE-1:0]  rx_valid,
  output logic             stall
);
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_DONE} state_e;
  state_e     state;
  logic [3:0] cnt;
  dir_e       cur_dir, sel_dir;
  logic [3:0] sel_dis;
  logic       load, shift;

  // Source PE of p for a hop in direction d, and whether the link exists.
  function automatic int src_of(int p, int d);
    int r, c, dr, dc, sr, sc;
    r = p / COLS; c = p % COLS;
    dr = 0; dc = 0;
    case (dir_e'(d))
      DIR_N:  dr = -1;
      DIR_S:  dr =  1;
      DIR_E:  dc =  1;
      DIR_W:  dc = -1;
      DIR_NE: begin dr = -1; dc =  1; end
      DIR_NW: begin dr = -1; dc = -1; end
      DIR_SE: begin dr =  1; dc =  1; end
      default: begin dr = 1; dc = -1; end
    endcase
    if (TOPO == TOPO_LINEAR || TOPO == TOPO_RING) begin
      sr = p - dc;
      if (dr != 0) return -1;
      if (sr < 0 || sr >= int'(N_PE)) begin
        if (TOPO == TOPO_LINEAR) return -1;
        sr = (sr + int'(N_PE)) % int'(N_PE);
      end
      return sr;
    end
    if (TOPO != TOPO_XNET && dr != 0 && dc != 0) return -1;
    sr = r - dr; sc = c - dc;
    if (sr < 0 || sr >= int'(ROWS) || sc < 0 || sc >= int'(COLS)) begin
      if (TOPO != TOPO_TORUS) return -1;
      sr = (sr + int'(ROWS)) % int'(ROWS);
      sc = (sc + int'(COLS)) % int'(COLS);
    end
    return sr * int'(COLS) + sc;
  endfunction

  // Controller.
  always_comb begin
    sel_dir = DIR_N;
    sel_dis = '0;
    for (int i = N_PE - 1; i >= 0; i--) begin
      if (send[i]) begin
        sel_dir = dir[i];
        sel_dis = dis[i];
      end
    end
  end

  assign load  = state == S_IDLE && |send;
  assign shift = state == S_SHIFT;
  assign stall = (state == S_IDLE && |send) || state == S_SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      cur_dir <= DIR_N;
    end else begin
      unique case (state)
        S_IDLE: if (|send) begin
          cur_dir <= sel_dir;
          cnt     <= sel_dis;
          state   <= (sel_dis == 0) ? S_DONE : S_SHIFT;
        end
        S_SHIFT: begin
          cnt <= cnt - 4'd1;
          if (cnt == 4'd1) state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Routers and topology wiring.
  for (genvar p = 0; p < N_PE; p++) begin : g_rt
    word_t [7:0] lnk_data;
    logic  [7:0] lnk_valid, lnk_ok;
    for (genvar d = 0; d < 8; d++) begin : g_lnk
      localparam int SRC = src_of(p, d);
      if (SRC >= 0) begin : g_on
        assign lnk_data[d]  = rx_data[SRC];
        assign lnk_valid[d] = rx_valid[SRC];
        assign lnk_ok[d]    = 1'b1;
      end else begin : g_off
        assign lnk_data[d]  = '0;
        assign lnk_valid[d] = 1'b0;
        assign lnk_ok[d]    = 1'b0;
      end
    end
    neigh_router u_rt (
      .clk, .rst_n,
      .load, .load_data(wdata[p]), .load_valid(send[p]),
      .shift, .dir(cur_dir),
      .in_data(lnk_data), .in_valid(lnk_valid), .in_ok(lnk_ok),
      .data(rx_data[p]), .valid(rx_valid[p])
    );
  end

  // All sending PEs must agree on direction and distance.
  always_ff @(posedge clk) begin
    if (rst_n && load) begin
      for (int i = 0; i < N_PE; i++)
        assert (!send[i] || (dir[i] == sel_dir && dis[i] == sel_dis))
          else $error("neigh_net: PE %0d sends in another direction/distance", i);
    end
  end
endmodule
