// simeck_round: one SIMECK 64/128 round, purely combinational.
//
//   f(x)   = (x & ROL5(x)) ^ ROL1(x)
//   l_next = r ^ f(l) ^ k,   r_next = l.
// The same module also serves the SIMECK key schedule, where the "key" is the
// round constant C ^ z_i. No clock; one round is applied per cycle by the core.
module simeck_round
  import lwc_pkg::*;
(
  input  word_t l,
  input  word_t r,
  input  word_t k,
  output word_t l_next,
  output word_t r_next
);
  always_comb begin
    l_next = r ^ (l & rol(l, 5)) ^ rol(l, 1) ^ k;
    r_next = l;
  end
endmodule
