// neigh_router: router of the neighbourhood network, one per PE.
//
// It holds one word, the datum travelling through this PE position (there is
// no FIFO: neighbour transfers are synchronous and all go the same way at a
// given time). load copies the PE's outgoing word in. On each shift cycle the
// router takes the word of the neighbour it receives from in direction dir,
// in_data[dir]; only that one link is enabled, the seven others are ignored.
// in_ok[dir] low means the topology has no such link (an array edge): the
// router then holds zero and clears valid. The held word is the PE's
// incoming word (data/valid) for P_REG_REC.
module neigh_router
  import simd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  word_t       load_data,
  input  logic        load_valid,
  input  logic        shift,
  input  dir_e        dir,
  input  word_t [7:0] in_data,
  input  logic  [7:0] in_valid,
  input  logic  [7:0] in_ok,
  output word_t       data,
  output logic        valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data  <= '0;
      valid <= 1'b0;
    end else if (load) begin
      data  <= load_data;
      valid <= load_valid;
    end else if (shift) begin
      data  <= in_ok[dir] ? in_data[dir]  : '0;
      valid <= in_ok[dir] && in_valid[dir];
    end
  end
endmodule
