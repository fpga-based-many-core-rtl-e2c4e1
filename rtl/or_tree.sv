// or_tree: global OR of the activity bits of all PEs, read by the ACU
// (GET_OR_TREE) to learn whether at least one PE is still enabled.
//
// Built as a balanced binary tree of two-input ORs, ceil(log2 N) levels,
// purely combinational: the result follows the activity bits in the same
// cycle.
module or_tree #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] in,
  output logic         out
);
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned W      = 1 << LEVELS;

  // node[l] holds the W >> l values of level l; level 0 is the padded input.
  logic [W-1:0] node [LEVELS+1];

  always_comb begin
    for (int l = 0; l <= LEVELS; l++) node[l] = '0;
    node[0] = W'(in);
    for (int l = 1; l <= LEVELS; l++)
      for (int i = 0; i < (W >> l); i++)
        node[l][i] = node[l-1][2*i] | node[l-1][2*i+1];
  end

  assign out = node[LEVELS][0];
endmodule
