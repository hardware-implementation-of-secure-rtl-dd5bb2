// simon_keygen: SIMON 64/128 key schedule, one round key per cycle.
//
// Four 32-bit subkey registers a..d hold k[i] .. k[i+3]; rk = a = k[i] is the
// key of the current round. Each step shifts d->c->b->a and writes into d
//   k[i+4] = c ^ z3[i] ^ k[i] ^ t ^ ROR1(t),   t = ROR3(k[i+3]) ^ k[i+1],
// with c = 0xFFFFFFFC. A single 2:1 multiplexer in front of d chooses between
// key_in (load) and this feedback (step), so the key is loaded by four load
// pulses with the least significant word first. round_idx selects the z3 bit.
// Timing: registers update on the rising clock edge; load has priority.
// The register structure follows the original architecture; the load order is
// this implementation's choice.
module simon_keygen
  import lwc_pkg::*;
(
  input  logic       clk,
  input  logic       load,
  input  logic       step,
  input  word_t      key_in,
  input  logic [5:0] round_idx,
  output word_t      rk
);
  word_t ka, kb, kc, kd;
  word_t t, knew;
  logic  z;

  always_comb begin
    z    = SIMON_Z3[6'd61 - round_idx];
    t    = ror(kd, 3) ^ kb;
    knew = KS_CONST ^ {31'd0, z} ^ ka ^ t ^ ror(t, 1);
  end

  always_ff @(posedge clk) begin
    if (load || step) begin
      ka <= kb;
      kb <= kc;
      kc <= kd;
      kd <= load ? key_in : knew;
    end
  end

  assign rk = ka;
endmodule
