// simeck_keygen: SIMECK 64/128 key schedule, one round key per cycle.
//
// The four key words form a feedback shift (t2, t1, t0, k0); rk = k0 is the
// current round key. Each step applies the SIMECK round function to
// (t0, k0) with the constant C ^ z_i as its key:
//   k0 <= t0, t0 <= t1, t1 <= t2, t2 <= k0 ^ f(t0) ^ C ^ z_i,
// C = 0xFFFFFFFC. z_i comes from a 6-bit LFSR (x^6 + x + 1, all-ones start)
// which a load restarts. Loading shifts key_in into t2, least significant
// word first, so after four loads k0 holds the lowest and t2 the highest key
// word. Registers update on the rising clock edge; load has priority.
module simeck_keygen
  import lwc_pkg::*;
(
  input  logic  clk,
  input  logic  load,
  input  logic  step,
  input  word_t key_in,
  output word_t rk
);
  word_t      k0, t0, t1, t2;
  word_t      fb;
  logic [5:0] lfsr;

  simeck_round u_f (
    .l      (t0),
    .r      (k0),
    .k      (KS_CONST ^ {31'd0, lfsr[0]}),
    .l_next (fb),
    .r_next ()      // equals t0, already at hand
  );

  always_ff @(posedge clk) begin
    if (load) begin
      k0   <= t0;
      t0   <= t1;
      t1   <= t2;
      t2   <= key_in;
      lfsr <= 6'h3F;
    end else if (step) begin
      k0   <= t0;
      t0   <= t1;
      t1   <= t2;
      t2   <= fb;
      lfsr <= {lfsr[0] ^ lfsr[1], lfsr[5:1]};
    end
  end

  assign rk = k0;
endmodule
