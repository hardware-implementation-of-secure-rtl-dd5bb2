// lwc_ref_pkg: behavioural reference models of LED-128, SIMON 64/128 and
// SIMECK 64/128 encryption, for the testbenches only.
//
// They are written independently of the RTL: LED works on an array of 16
// nibbles and mixes columns with four serial applications of the companion
// matrix A (not the folded A^4), its round constants come from a table, and
// the SIMECK z sequence is a table rather than an LFSR. Each model is
// anchored by the published test vectors checked in the testbenches.
package lwc_ref_pkg;

  function automatic logic [31:0] rl(input logic [31:0] x, input int r);
    return (x << r) | (x >> (32 - r));
  endfunction

  // ---------------- SIMON 64/128 ----------------
  localparam string SIMON_Z3_STR =
      "11011011101011000110010111100000010010001010011100110100001111";

  function automatic void simon_keys(input logic [127:0] key, output logic [31:0] k [44]);
    logic [31:0] t;
    for (int i = 0; i < 4; i++) k[i] = key[32*i +: 32];
    for (int i = 0; i < 40; i++) begin
      t = rl(k[i+3], 29) ^ k[i+1];
      t = t ^ rl(t, 31);
      k[i+4] = ~k[i] ^ t ^ 32'(SIMON_Z3_STR[i] == "1") ^ 32'd3;
    end
  endfunction

  function automatic logic [63:0] simon_enc(input logic [63:0] pt, input logic [127:0] key);
    logic [31:0] k [44];
    logic [31:0] l, r, tmp;
    simon_keys(key, k);
    l = pt[63:32]; r = pt[31:0];
    for (int i = 0; i < 44; i++) begin
      tmp = r ^ (rl(l, 1) & rl(l, 8)) ^ rl(l, 2) ^ k[i];
      r = l; l = tmp;
    end
    return {l, r};
  endfunction

  // ---------------- SIMECK 64/128 ----------------
  localparam string SIMECK_Z_STR = "11111100000100001100010100111101000111001001";

  function automatic logic [31:0] simeck_f(input logic [31:0] x);
    return (x & rl(x, 5)) ^ rl(x, 1);
  endfunction

  function automatic void simeck_keys(input logic [127:0] key, output logic [31:0] k [44]);
    logic [31:0] w [48];
    for (int i = 0; i < 4; i++) w[i] = key[32*i +: 32];
    // w[i] = k_i for the current key, w[i+1..i+3] = t0..t2
    for (int i = 0; i < 44; i++) begin
      k[i] = w[i];
      w[i+4] = w[i] ^ simeck_f(w[i+1]) ^ 32'hFFFF_FFFC ^ 32'(SIMECK_Z_STR[i] == "1");
    end
  endfunction

  function automatic logic [63:0] simeck_enc(input logic [63:0] pt, input logic [127:0] key);
    logic [31:0] k [44];
    logic [31:0] l, r, tmp;
    simeck_keys(key, k);
    l = pt[63:32]; r = pt[31:0];
    for (int i = 0; i < 44; i++) begin
      tmp = r ^ simeck_f(l) ^ k[i];
      r = l; l = tmp;
    end
    return {l, r};
  endfunction

  // ---------------- LED-128 ----------------
  localparam logic [3:0] SB [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                     4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};
  localparam logic [5:0] RC [48] = '{
      6'h01, 6'h03, 6'h07, 6'h0f, 6'h1f, 6'h3e, 6'h3d, 6'h3b, 6'h37, 6'h2f, 6'h1e, 6'h3c,
      6'h39, 6'h33, 6'h27, 6'h0e, 6'h1d, 6'h3a, 6'h35, 6'h2b, 6'h16, 6'h2c, 6'h18, 6'h30,
      6'h21, 6'h02, 6'h05, 6'h0b, 6'h17, 6'h2e, 6'h1c, 6'h38, 6'h31, 6'h23, 6'h06, 6'h0d,
      6'h1b, 6'h36, 6'h2d, 6'h1a, 6'h34, 6'h29, 6'h12, 6'h24, 6'h08, 6'h11, 6'h22, 6'h04};

  function automatic logic [3:0] xt(input logic [3:0] a);   // multiply by x
    return {a[2:0], 1'b0} ^ (a[3] ? 4'h3 : 4'h0);
  endfunction

  // One serial step: column (a,b,c,d) -> (b,c,d, 4a ^ b ^ 2c ^ 2d)
  function automatic void led_col(inout logic [3:0] c [4]);
    logic [3:0] n;
    for (int s = 0; s < 4; s++) begin
      n = xt(xt(c[0])) ^ c[1] ^ xt(c[2]) ^ xt(c[3]);
      c[0] = c[1]; c[1] = c[2]; c[2] = c[3]; c[3] = n;
    end
  endfunction

  function automatic logic [63:0] led_mix(input logic [63:0] x);   // 64-bit state
    logic [3:0] c [4];
    logic [63:0] y;
    for (int j = 0; j < 4; j++) begin
      for (int i = 0; i < 4; i++) c[i] = x[60 - 16*i - 4*j +: 4];
      led_col(c);
      for (int i = 0; i < 4; i++) y[60 - 16*i - 4*j +: 4] = c[i];
    end
    return y;
  endfunction

  function automatic logic [63:0] led_enc(input logic [63:0] pt, input logic [127:0] key);
    logic [3:0] s [16];
    logic [3:0] t [16];
    logic [63:0] v;
    logic [5:0] rc;
    for (int i = 0; i < 16; i++) s[i] = pt[60 - 4*i +: 4];
    for (int step = 0; step < 12; step++) begin
      v = (step % 2 == 0) ? key[127:64] : key[63:0];
      for (int i = 0; i < 16; i++) s[i] ^= v[60 - 4*i +: 4];
      for (int r = 0; r < 4; r++) begin
        rc = RC[4*step + r];
        s[0] ^= 4'h8; s[4] ^= 4'h9; s[8] ^= 4'h2; s[12] ^= 4'h3;
        s[1] ^= {1'b0, rc[5:3]}; s[5] ^= {1'b0, rc[2:0]};
        s[9] ^= {1'b0, rc[5:3]}; s[13] ^= {1'b0, rc[2:0]};
        for (int i = 0; i < 16; i++) s[i] = SB[s[i]];
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) t[4*i + j] = s[4*i + (j + i) % 4];
        for (int i = 0; i < 16; i++) v[60 - 4*i +: 4] = t[i];
        v = led_mix(v);
        for (int i = 0; i < 16; i++) s[i] = v[60 - 4*i +: 4];
      end
    end
    for (int i = 0; i < 16; i++) v[60 - 4*i +: 4] = s[i] ^ key[124 - 4*i +: 4];
    return v;
  endfunction

endpackage
