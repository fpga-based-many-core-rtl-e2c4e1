// global_noc: the global network. A communication mode manager and an
// interconnection network connect the PEs with one another, the ACU with the
// PEs, and the PEs with an input and an output I/O device. NET picks the
// interconnection network: a full crossbar (default, non-blocking), a shared
// bus (one word per cycle, lowest PE first) or an Omega/Delta multistage
// network (delta_net, blocking). On the last two a PE->PE transfer whose
// words cannot all pass at once holds the pipeline and offers the words that
// were refused again, one cycle per pass, until all have arrived; the
// instruction commits in the cycle after. With the crossbar every word
// passes in the first cycle, and two words for one PE raise conflict.
//
// The mode register (written by the ACU, SET_MODE_NOC) selects:
//   0 PE->PE   each sending PE's word goes through the network into the
//              receive register of PE dest; one cycle on the crossbar
//   1 ACU->PE  the ACU's word goes into the receive register of PE dest
//   2 PE->dev  the words of all sending PEs leave on the output device port
//              one per accepted cycle, in PE order; pipeline held meanwhile
//   3 dev->PE  each receiving PE gets the next word of the input device
//              port, in PE order; pipeline held meanwhile
//   4 PE->ACU  each sending PE posts its word; the ACU reads the one of PE src
// A P_NOC_REC in modes 0, 1 and 4 reads the PE's receive register in one
// cycle. A mode 2/3 transfer of k PEs holds the pipeline k+1 cycles when the
// device never waits (one cycle to start, one per word), then releases it
// for the completing cycle. Device ports are valid/ready streams; the
// sending or receiving PE's number travels with each word.
//
// The mode manager, the five mode numbers, the three network types and the
// crossbar as the usual choice follow the architecture. What each mode
// does, the serialised device streams, the shared receive register and the
// retry scheme of the blocking networks are this design's own choices.
module global_noc
  import simd_pkg::*;
#(
  parameter int unsigned N_PE = 32,
  parameter noc_net_e    NET  = NET_CROSSBAR
) (
  input  logic            clk,
  input  logic            rst_n,
  // mode manager
  input  logic            mode_we,
  input  noc_mode_e       mode_wdata,
  output noc_mode_e       mode,
  // PE side
  input  logic [N_PE-1:0] pe_send,
  input  logic [N_PE-1:0] pe_recv,
  input  logic [11:0]     pe_peer [N_PE],
  input  word_t           pe_wdata[N_PE],
  output word_t           pe_rx   [N_PE],
  // ACU side
  input  logic            acu_we,
  input  logic            acu_re,
  input  logic [11:0]     acu_peer,
  input  word_t           acu_wdata,
  output word_t           acu_rdata,
  // output device (PE -> device)
  output logic            out_valid,
  input  logic            out_ready,
  output word_t           out_data,
  output logic [11:0]     out_pe,
  // input device (device -> PE)
  input  logic            in_valid,
  output logic            in_ready,
  input  word_t           in_data,
  output logic [11:0]     in_pe,
  // status
  output logic            stall,
  output logic            conflict
);
  localparam int PW = N_PE > 1 ? $clog2(N_PE) : 1;   // PE number width
  localparam int unsigned NI = N_PE + 1;   // crossbar input N_PE is the ACU

  typedef enum logic [1:0] {S_IDLE, S_BUSY, S_NET, S_DONE} state_e;
  state_e          state;
  logic [N_PE-1:0] pending;
  int unsigned     cur;
  logic            io_start, step, net_start;
  logic [NI-1:0]   x_grant;

  logic [NI-1:0]   x_req;
  logic [11:0]     x_dest [NI];
  word_t           x_din  [NI];
  logic [N_PE-1:0] x_vout;
  word_t           x_dout [N_PE];
  word_t           post   [N_PE];

  // ---------------------------------------------------------- mode manager
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       mode <= NOC_PE_PE;
    else if (mode_we) mode <= mode_wdata;
  end

  // ------------------------------------------------------------- crossbar
  always_comb begin
    // a PE->PE word is offered in the first cycle and, on a blocking
    // network, again in every retry cycle until it has passed
    for (int i = 0; i < N_PE; i++) begin
      x_req[i]  = mode == NOC_PE_PE && pe_send[i] &&
                  (state == S_IDLE || (state == S_NET && pending[i]));
      x_dest[i] = pe_peer[i];
      x_din[i]  = pe_wdata[i];
    end
    x_req[N_PE]  = mode == NOC_ACU_PE && acu_we;
    x_dest[N_PE] = acu_peer;
    x_din[N_PE]  = acu_wdata;
  end

  if (NET == NET_CROSSBAR) begin : g_xbar
    // non-blocking: every word passes at once (lowest source wins a clash)
    crossbar #(.N_IN(NI), .N_OUT(N_PE), .DW(12)) u_xbar (
      .req(x_req), .dest(x_dest), .din(x_din),
      .vout(x_vout), .dout(x_dout), .conflict
    );
    assign x_grant = x_req;
  end else if (NET == NET_BUS) begin : g_bus
    // one shared bus: the lowest-numbered requester owns it this cycle
    int unsigned owner;
    always_comb begin
      owner = 0;
      for (int i = NI - 1; i >= 0; i--) if (x_req[i]) owner = i;
      x_grant  = '0;
      conflict = 1'b0;
      for (int j = 0; j < N_PE; j++) begin
        x_vout[j] = |x_req && 32'(x_dest[owner]) == j;
        x_dout[j] = x_din[owner];
      end
      if (|x_req) x_grant[owner] = 1'b1;
    end
  end else begin : g_delta
    // Omega network on the next power of two; the ACU uses port 0, which
    // no PE drives in mode 1. Words for a missing PE are dropped.
    localparam int unsigned NP = 1 << PW;
    logic [NP-1:0] d_req, d_grant, d_vout;
    logic [PW-1:0] d_dest [NP];
    word_t         d_din  [NP];
    word_t         d_dout [NP];
    logic [NI-1:0] in_range;
    always_comb begin
      for (int i = 0; i < NI; i++) in_range[i] = 32'(x_dest[i]) < N_PE;
      for (int p = 0; p < NP; p++) begin
        d_req[p]  = (p < N_PE) ? x_req[p] && in_range[p] : 1'b0;
        d_dest[p] = (p < N_PE) ? PW'(x_dest[p]) : '0;
        d_din[p]  = (p < N_PE) ? x_din[p] : '0;
      end
      if (x_req[N_PE]) begin
        d_req[0]  = in_range[N_PE];
        d_dest[0] = PW'(x_dest[N_PE]);
        d_din[0]  = x_din[N_PE];
      end
      for (int i = 0; i < N_PE; i++) x_grant[i] = x_req[i] && (!in_range[i] || d_grant[i]);
      x_grant[N_PE] = x_req[N_PE];
      for (int j = 0; j < N_PE; j++) begin
        x_vout[j] = d_vout[j];
        x_dout[j] = d_dout[j];
      end
      conflict = 1'b0;
    end
    delta_net #(.N(NP)) u_delta (
      .req(d_req), .dest(d_dest), .din(d_din),
      .grant(d_grant), .vout(d_vout), .dout(d_dout)
    );
  end

  // ------------------------------------------------- device transfers FSM
  assign io_start = state == S_IDLE &&
                    ((mode == NOC_PE_DEV && |pe_send) || (mode == NOC_DEV_PE && |pe_recv));

  always_comb begin
    cur = 0;
    for (int i = N_PE - 1; i >= 0; i--) if (pending[i]) cur = i;
  end

  assign out_valid = state == S_BUSY && mode == NOC_PE_DEV && |pending;
  assign out_data  = pe_wdata[cur];
  assign out_pe    = 12'(cur);
  assign in_ready  = state == S_BUSY && mode == NOC_DEV_PE && |pending;
  assign in_pe     = 12'(cur);
  assign step      = (out_valid && out_ready) || (in_valid && in_ready);
  // words a blocking network could not pass this cycle
  assign net_start = state == S_IDLE && mode == NOC_PE_PE &&
                     |(x_req[N_PE-1:0] & ~x_grant[N_PE-1:0]);
  assign stall     = io_start || net_start || state == S_BUSY || state == S_NET;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      pending <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (io_start) begin
          pending <= (mode == NOC_PE_DEV) ? pe_send : pe_recv;
          state   <= S_BUSY;
        end else if (net_start) begin
          pending <= x_req[N_PE-1:0] & ~x_grant[N_PE-1:0];
          state   <= S_NET;
        end
        S_NET: begin
          pending <= pending & ~x_grant[N_PE-1:0];
          if ((pending & ~x_grant[N_PE-1:0]) == '0) state <= S_DONE;
        end
        S_BUSY: if (step) begin
          pending[cur] <= 1'b0;
          if ((pending & ~(N_PE'(1) << cur)) == '0) state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------- receive and posting registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_PE; i++) begin
        pe_rx[i] <= '0;
        post[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < N_PE; i++) begin
        if (x_vout[i]) pe_rx[i] <= x_dout[i];
        if (mode == NOC_PE_ACU && pe_send[i]) post[i] <= pe_wdata[i];
      end
      if (in_valid && in_ready) pe_rx[cur] <= in_data;
    end
  end

  assign acu_rdata = (32'(acu_peer) < N_PE) ? post[PW'(acu_peer % 12'(N_PE))] : '0;

  // A device word is only offered while its PE still asks for the transfer.
  always_ff @(posedge clk) begin
    if (rst_n && out_valid) assert (pe_send[cur])
      else $error("global_noc: PE %0d withdrew its send", cur);
  end
endmodule
