// simon_core: SIMON 64/128 encryption core with a 32-bit datapath.
//
// One Feistel round (l' = (S1(l) & S8(l)) ^ S2(l) ^ r ^ k, r' = l) and one key-schedule step are
// computed in the same clock cycle, so the 44 rounds take 44 cycles. The
// plaintext words pass through the same 2:1 multiplexer in front of the
// left-word register that selects the round output, and shift on into the
// right-word register; the key words enter the key schedule the same way.
//
// Interface (see lwc_ctrl): four load words with in_valid/in_ready, least
// significant first; key_in carries key words 0..3, data_in plaintext words
// 0 and 1 (ignored in load cycles 2 and 3). busy is high for the ROUNDS
// round cycles; then data_out gives the ciphertext low word and high word on
// two consecutive cycles with out_valid. Latency from the fourth load word
// to the first output word: ROUNDS + 1 clock edges.
//
// Round function, key schedule and cycle count follow the original architecture;
// handshake, word order and reset are this implementation's choices.
module simon_core
  import lwc_pkg::*;
#(
  parameter int unsigned ROUNDS = SIMON_ROUNDS
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
  logic                      load_en, run, out_hi;
  logic [1:0]                load_idx;
  logic [$clog2(ROUNDS)-1:0] run_cnt;
  word_t                     l, r, l_nx, r_nx, rk;
  logic                      load_data;

  lwc_ctrl #(.RUN_CYCLES(ROUNDS)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .load_en, .load_idx,
    .run, .run_cnt, .out_valid, .out_hi
  );

  simon_keygen u_key (
    .clk       (clk),
    .load      (load_en),
    .step      (run),
    .round_idx (6'(run_cnt)),
    .key_in    (key_in),
    .rk        (rk)
  );

  simon_round u_round (
    .l      (l),
    .r      (r),
    .k      (rk),
    .l_next (l_nx),
    .r_next (r_nx)
  );

  assign load_data = load_en && (load_idx < 2'(BLK_WORDS));

  always_ff @(posedge clk) begin
    if (load_data) begin
      l <= data_in;
      r <= l;
    end else if (run) begin
      l <= l_nx;
      r <= r_nx;
    end
  end

  assign busy     = run;
  assign data_out = out_hi ? l : r;
endmodule
