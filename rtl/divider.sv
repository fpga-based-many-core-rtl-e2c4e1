// divider: iterative radix-2 restoring divider for DIV/DIVU, one in the ACU
// and one in every PE.
//
// start (one cycle) loads the operands; the divider then performs one
// quotient bit per cycle for 32 cycles, after which q and r hold the result
// until the next start. Signed division works on magnitudes and fixes the
// signs at the end: the quotient rounds toward zero and the remainder takes
// the dividend's sign, as in MIPS. Division by zero gives q = all ones and
// r = dividend (this design's choice). Every divider in the system takes
// exactly the same number of cycles, so the ACU can hold the whole machine
// for a fixed time (DIV_CYCLES in simd_pkg) instead of collecting done
// signals from the PEs.
module divider
  import simd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  sgn,     // 1: DIV (signed), 0: DIVU
  input  word_t a,       // dividend
  input  word_t b,       // divisor
  output word_t q,
  output word_t r,
  output logic  busy
);
  word_t      quo, rem, div;
  logic [5:0] cnt;
  logic       neg_q, neg_r, dz;
  word_t      ua, ub;
  logic [32:0] rem_sh, diff;

  assign ua = (sgn && a[31]) ? -a : a;
  assign ub = (sgn && b[31]) ? -b : b;

  assign rem_sh = {rem, quo[31]};
  assign diff   = rem_sh - {1'b0, div};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quo <= '0; rem <= '0; div <= '0; cnt <= '0;
      neg_q <= 1'b0; neg_r <= 1'b0; dz <= 1'b0;
    end else if (start) begin
      quo   <= ua;
      rem   <= '0;
      div   <= ub;
      cnt   <= 6'(DIV_CYCLES);
      neg_q <= sgn && (a[31] ^ b[31]);
      neg_r <= sgn && a[31];
      dz    <= b == '0;
    end else if (cnt != 0) begin
      cnt <= cnt - 6'd1;
      if (!diff[32]) begin
        rem <= diff[31:0];
        quo <= {quo[30:0], 1'b1};
      end else begin
        rem <= rem_sh[31:0];
        quo <= {quo[30:0], 1'b0};
      end
    end
  end

  assign busy = cnt != 0;
  assign q = dz ? '1 : (neg_q ? -quo : quo);
  assign r = neg_r ? -rem : rem;
endmodule
