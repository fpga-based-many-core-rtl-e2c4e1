// crossbar: full N_IN x N_OUT crossbar, the interconnection network inside
// the global NoC.
//
// Every input i carries a request (req[i]), a destination port (dest[i]) and
// a word. Each output j independently selects the input that addresses it,
// so any permutation passes in one cycle without blocking. If several inputs
// address the same output the lowest-numbered one wins and conflict is
// raised (SIMD programs are expected to use one-to-one patterns). Purely
// combinational.
module crossbar
  import simd_pkg::*;
#(
  parameter int unsigned N_IN  = 33,
  parameter int unsigned N_OUT = 32,
  parameter int unsigned DW    = 12
) (
  input  logic  [N_IN-1:0]   req,
  input  logic  [DW-1:0]     dest [N_IN],
  input  word_t              din  [N_IN],
  output logic  [N_OUT-1:0]  vout,
  output word_t              dout [N_OUT],
  output logic               conflict
);
  always_comb begin
    conflict = 1'b0;
    for (int j = 0; j < N_OUT; j++) begin
      vout[j] = 1'b0;
      dout[j] = '0;
      for (int i = N_IN - 1; i >= 0; i--) begin
        if (req[i] && 32'(dest[i]) == j) begin
          if (vout[j]) conflict = 1'b1;
          vout[j] = 1'b1;
          dout[j] = din[i];
        end
      end
    end
  end
endmodule
