// simon_round: one SIMON 64/128 encryption round, purely combinational.
//
// Feistel step on two 32-bit words:
//   l_next = (ROL1(l) & ROL8(l)) ^ ROL2(l) ^ r ^ k,   r_next = l.
// The rotations are wiring; the round costs one 32-bit AND and three 32-bit
// XORs, as in the original round-function datapath. No clock: the surrounding
// core registers l and r and applies one round per cycle.
module simon_round
  import lwc_pkg::*;
(
  input  word_t l,
  input  word_t r,
  input  word_t k,
  output word_t l_next,
  output word_t r_next
);
  always_comb begin
    l_next = (rol(l, 1) & rol(l, 8)) ^ rol(l, 2) ^ r ^ k;
    r_next = l;
  end
endmodule
