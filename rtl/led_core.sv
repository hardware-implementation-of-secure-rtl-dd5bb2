// led_core: LED-128 encryption core with a serial 32-bit datapath.
//
// State: a 64-bit register seen as a 4x4 matrix of nibbles (row-major, cell
// (0,0) in bits 63:60) and a 128-bit key register, K1 = key[127:64],
// K2 = key[63:0]. K1 and K2 are XORed into the state alternately at the start
// of every four-round step (K1 for steps 0, 2, ..); after the 48 rounds K1
// is added once more, on the output words as they leave.
//
// Each round takes four cycles through the shared 32-bit units:
//   phase 0: rows 0-1  <- SubCells(AddConstants(AddRoundKey(rows 0-1)))
//   phase 1: rows 2-3  <- the same on rows 2-3
//   phase 2: state     <- ShiftRows(state), with columns 0-1 then mixed
//   phase 3: columns 2-3 <- MixColumnsSerial(columns 2-3); next constant
// A 4:1 multiplexer picks the 32-bit key word ({K1,K2} x {upper,lower}), a
// 2:1 multiplexer the 32-bit half for the S-box layer and a 64-bit 2:1
// multiplexer the shifted or unshifted state for the mix unit.
//
// Interface (see lwc_ctrl): four load words with in_valid/in_ready, least
// significant first; key_in carries key words 0..3, data_in plaintext words
// 0 and 1. busy is high for 4*ROUNDS = 192 cycles; then data_out gives the
// ciphertext low word and high word on two consecutive cycles with
// out_valid.
//
// Key use, round functions and the 192-cycle latency follow the original
// design; the phase order inside a round, handshake, word order and reset
// are this implementation's choices.
module led_core
  import lwc_pkg::*;
#(
  parameter int unsigned ROUNDS = LED_ROUNDS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t data_in,
  input  word_t key_in,
  output logic  busy,
  output logic  out_valid,
  output word_t data_out
);
  localparam int unsigned RUN = 4 * ROUNDS;
  localparam int unsigned CW  = $clog2(RUN);

  logic          load_en, run, out_hi, load_data;
  logic [1:0]    load_idx, phase;
  logic [CW-1:0] run_cnt;
  logic [CW-3:0] round;

  logic [63:0]   st, st_sr, st_nx;
  logic [127:0]  key;
  logic [5:0]    rc;
  word_t         key_word, sub_in, sub_out, mix_in, mix_out;
  logic [63:0]   mix_base;

  lwc_ctrl #(.RUN_CYCLES(RUN)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .load_en, .load_idx,
    .run, .run_cnt, .out_valid, .out_hi
  );

  assign phase = run_cnt[1:0];
  assign round = run_cnt[CW-1:2];

  // MUX 4/1: key word for this half. round[2] = odd step -> K2.
  always_comb begin
    unique case ({round[2], phase[0]})
      2'b00:   key_word = key[127:96];  // K1, rows 0-1
      2'b01:   key_word = key[95:64];   // K1, rows 2-3
      2'b10:   key_word = key[63:32];   // K2, rows 0-1
      default: key_word = key[31:0];    // K2, rows 2-3
    endcase
  end

  assign sub_in = phase[0] ? st[31:0] : st[63:32];

  led_subcells32 u_sub (
    .din      (sub_in),
    .key_word (key_word),
    .add_key  (round[1:0] == 2'b00),
    .lower    (phase[0]),
    .rc       (rc),
    .dout     (sub_out)
  );

  // ShiftRows: row i rotated left by i cells.
  always_comb begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        st_sr[60 - 16*i - 4*j +: 4] = st[60 - 16*i - 4*((j + i) % 4) +: 4];
  end

  // 64-bit MUX 2/1 and column pair gather for the mix unit.
  assign mix_base = phase[0] ? st : st_sr;
  always_comb begin
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 4; i++)
        mix_in[16*(1-c) + 4*(3-i) +: 4] =
            mix_base[60 - 16*i - 4*(2*int'(phase[0]) + c) +: 4];
  end

  led_mixcol32 u_mix (
    .din  (mix_in),
    .dout (mix_out)
  );

  always_comb begin
    st_nx = st;
    unique case (phase)
      2'd0: st_nx[63:32] = sub_out;
      2'd1: st_nx[31:0]  = sub_out;
      default: begin
        st_nx = mix_base;
        for (int c = 0; c < 2; c++)
          for (int i = 0; i < 4; i++)
            st_nx[60 - 16*i - 4*(2*int'(phase[0]) + c) +: 4] =
                mix_out[16*(1-c) + 4*(3-i) +: 4];
      end
    endcase
  end

  assign load_data = load_en && (load_idx < 2'(BLK_WORDS));

  always_ff @(posedge clk) begin
    if (load_en) begin
      key <= {key_in, key[127:32]};
      rc  <= led_rc_next(6'd0);
    end else if (run && phase == 2'd3) begin
      rc  <= led_rc_next(rc);
    end
    if (load_data)  st <= {data_in, st[63:32]};
    else if (run)   st <= st_nx;
  end

  assign busy     = run;
  // Final AddRoundKey with K1 on the way out.
  assign data_out = out_hi ? (st[63:32] ^ key[127:96]) : (st[31:0] ^ key[95:64]);
endmodule
