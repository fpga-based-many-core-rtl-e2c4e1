// delta_net: Omega (shuffle-exchange) multistage interconnection network, a
// Delta network of log2(N) stages of 2x2 switches, as one choice of the
// network inside the global NoC.
//
// Before every stage the N positions are perfectly shuffled (position bits
// rotated left by one); each 2x2 switch then sends a word to its upper output
// when the current destination bit is 0 and to its lower output when it is 1,
// taking the destination bits most significant first. After the last stage a
// word sits at the position equal to its destination. The network is
// blocking: when both words at a switch want the same output, the one from
// the lower-numbered source passes and the other is dropped for this cycle.
// grant[i] tells source i that its word arrived; the global NoC offers the
// blocked words again in the following cycles.
//
// Interface: req/dest/din per source, vout/dout per destination, grant per
// source. N must be a power of two. Purely combinational.
//
// A Delta multistage network as an option for the global NoC, and the fact
// that it blocks, follow the architecture; the Omega wiring, the routing
// bit order and the lower-source-wins rule are this design's own choices.
module delta_net
  import simd_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]         req,
  input  logic [$clog2(N)-1:0] dest [N],
  input  word_t                din  [N],
  output logic [N-1:0]         grant,
  output logic [N-1:0]         vout,
  output word_t                dout [N]
);
  localparam int unsigned S = $clog2(N);
  typedef logic [S-1:0] idx_t;

  // stage s inputs (v/dst/src/dat) and the same words after the shuffle (sh_*)
  logic  v      [S+1][N];
  idx_t  dst    [S+1][N];
  idx_t  src    [S+1][N];
  word_t dat    [S+1][N];
  logic  sh_v   [S][N];
  idx_t  sh_dst [S][N];
  idx_t  sh_src [S][N];
  word_t sh_dat [S][N];

  function automatic idx_t shuffle(idx_t p);
    return (S > 1) ? {p[S-2:0], p[S-1]} : p;
  endfunction

  always_comb begin
    for (int p = 0; p < N; p++) begin
      v[0][p]   = req[p];
      dst[0][p] = dest[p];
      src[0][p] = idx_t'(p);
      dat[0][p] = din[p];
    end
    for (int s = 0; s < S; s++) begin
      for (int p = 0; p < N; p++) begin
        sh_v[s][shuffle(idx_t'(p))]   = v[s][p];
        sh_dst[s][shuffle(idx_t'(p))] = dst[s][p];
        sh_src[s][shuffle(idx_t'(p))] = src[s][p];
        sh_dat[s][shuffle(idx_t'(p))] = dat[s][p];
        v[s+1][p] = 1'b0; dst[s+1][p] = '0; src[s+1][p] = '0; dat[s+1][p] = '0;
      end
      for (int k = 0; k < N / 2; k++) begin
        int first, i, o;
        // the word from the lower-numbered source is routed first
        first = (sh_v[s][2*k+1] && (!sh_v[s][2*k] || sh_src[s][2*k+1] < sh_src[s][2*k])) ? 1 : 0;
        for (int e = 0; e < 2; e++) begin
          i = 2*k + ((e == 0) ? first : 1 - first);
          o = 2*k + int'(sh_dst[s][i][S-1-s]);
          if (sh_v[s][i] && !v[s+1][o]) begin
            v[s+1][o]   = 1'b1;
            dst[s+1][o] = sh_dst[s][i];
            src[s+1][o] = sh_src[s][i];
            dat[s+1][o] = sh_dat[s][i];
          end
        end
      end
    end
    grant = '0;
    for (int p = 0; p < N; p++) begin
      vout[p] = v[S][p];
      dout[p] = dat[S][p];
      if (v[S][p]) grant[src[S][p]] = 1'b1;
    end
  end
endmodule
