// lwc_pkg: types, constants and small pure functions shared by the three
// 64-bit-block / 128-bit-key lightweight cipher cores (LED-128, SIMON 64/128,
// SIMECK 64/128) that are built around a 32-bit datapath.
//
// Everything here is combinational. The cipher constants (PRESENT S-box,
// LED MixColumnsSerial matrix, SIMON z3 sequence, the 2^n-4 constant) come
// from the published cipher specifications; the load/run/output state type
// is this implementation's own choice of control encoding.
package lwc_pkg;

  localparam int unsigned WORD       = 32;  // datapath width
  localparam int unsigned BLOCK      = 64;  // block size
  localparam int unsigned KEY        = 128; // key size
  localparam int unsigned KEY_WORDS  = KEY / WORD;   // 4 load cycles
  localparam int unsigned BLK_WORDS  = BLOCK / WORD; // 2 data words

  localparam int unsigned LED_ROUNDS    = 48;
  localparam int unsigned SIMON_ROUNDS  = 44;
  localparam int unsigned SIMECK_ROUNDS = 44;

  // Control states of every core: taking load words, computing rounds,
  // presenting the low then the high ciphertext word.
  typedef enum logic [1:0] {
    ST_LOAD   = 2'd0,
    ST_RUN    = 2'd1,
    ST_OUT_LO = 2'd2,
    ST_OUT_HI = 2'd3
  } core_state_e;

  typedef logic [WORD-1:0] word_t;

  // c = 2^n - 4, used by both the SIMON and the SIMECK key schedules.
  localparam word_t KS_CONST = 32'hFFFF_FFFC;

  // SIMON 64/128 constant sequence z3; bit 61 is z3[0] (used in round 0).
  localparam logic [61:0] SIMON_Z3 =
      62'b11011011101011000110010111100000010010001010011100110100001111;

  function automatic word_t rol(input word_t x, input int unsigned r);
    return (x << r) | (x >> (WORD - r));
  endfunction

  function automatic word_t ror(input word_t x, input int unsigned r);
    return (x >> r) | (x << (WORD - r));
  endfunction

  // 4-bit PRESENT S-box, used by LED's SubCells.
  function automatic logic [3:0] present_sbox(input logic [3:0] x);
    logic [3:0] y;
    case (x)
      4'h0: y = 4'hC; 4'h1: y = 4'h5; 4'h2: y = 4'h6; 4'h3: y = 4'hB;
      4'h4: y = 4'h9; 4'h5: y = 4'h0; 4'h6: y = 4'hA; 4'h7: y = 4'hD;
      4'h8: y = 4'h3; 4'h9: y = 4'hE; 4'hA: y = 4'hF; 4'hB: y = 4'h8;
      4'hC: y = 4'h4; 4'hD: y = 4'h7; 4'hE: y = 4'h1; default: y = 4'h2;
    endcase
    return y;
  endfunction

  // Multiplication in GF(2^4) modulo x^4 + x + 1.
  function automatic logic [3:0] gf16_mul(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] acc, t;
    acc = '0;
    t   = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) acc ^= t;
      t = t[3] ? ({t[2:0], 1'b0} ^ 4'h3) : {t[2:0], 1'b0};
    end
    return acc;
  endfunction

  // LED MixColumnsSerial matrix M = A^4, row-major, cell [0][0] first.
  localparam logic [3:0] LED_MDS [4][4] = '{
      '{4'h4, 4'h1, 4'h2, 4'h2},
      '{4'h8, 4'h6, 4'h5, 4'h6},
      '{4'hB, 4'hE, 4'hA, 4'h9},
      '{4'h2, 4'h2, 4'hF, 4'hB}};

  // Next LED round constant: 6-bit shift left, new bit = rc5 ^ rc4 ^ 1.
  function automatic logic [5:0] led_rc_next(input logic [5:0] rc);
    return {rc[4:0], rc[5] ^ rc[4] ^ 1'b1};
  endfunction

endpackage
