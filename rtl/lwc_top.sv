// lwc_top: the three 32-bit datapath lightweight block ciphers side by side.
//
// LED-128 (serial datapath, 4 cycles per round, 192 cycles per block),
// SIMON 64/128 and SIMECK 64/128 (one round and one key-schedule step per
// cycle, 44 cycles per block). All take a 64-bit block and a 128-bit key as
// four 32-bit load words (in_valid/in_ready, least significant word first,
// plaintext on data_in in the first two) and return the ciphertext as two
// 32-bit words, low then high, on consecutive cycles with out_valid.
//
// The cores are independent alternatives for the same job; they share only
// clock and reset, and each has its own ports (prefix led_, simon_, simeck_).
// Pick one for an application by area, throughput or power; this top keeps
// all three so they can be simulated and synthesised together.
module lwc_top
  import lwc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // LED-128
  input  logic  led_in_valid,
  output logic  led_in_ready,
  input  word_t led_data_in,
  input  word_t led_key_in,
  output logic  led_busy,
  output logic  led_out_valid,
  output word_t led_data_out,
  // SIMON 64/128
  input  logic  simon_in_valid,
  output logic  simon_in_ready,
  input  word_t simon_data_in,
  input  word_t simon_key_in,
  output logic  simon_busy,
  output logic  simon_out_valid,
  output word_t simon_data_out,
  // SIMECK 64/128
  input  logic  simeck_in_valid,
  output logic  simeck_in_ready,
  input  word_t simeck_data_in,
  input  word_t simeck_key_in,
  output logic  simeck_busy,
  output logic  simeck_out_valid,
  output word_t simeck_data_out
);
  led_core u_led (
    .clk, .rst_n,
    .in_valid (led_in_valid), .in_ready (led_in_ready),
    .data_in  (led_data_in),  .key_in   (led_key_in),
    .busy     (led_busy),     .out_valid(led_out_valid), .data_out (led_data_out)
  );

  simon_core u_simon (
    .clk, .rst_n,
    .in_valid (simon_in_valid), .in_ready (simon_in_ready),
    .data_in  (simon_data_in),  .key_in   (simon_key_in),
    .busy     (simon_busy),     .out_valid(simon_out_valid), .data_out (simon_data_out)
  );

  simeck_core u_simeck (
    .clk, .rst_n,
    .in_valid (simeck_in_valid), .in_ready (simeck_in_ready),
    .data_in  (simeck_data_in),  .key_in   (simeck_key_in),
    .busy     (simeck_busy),     .out_valid(simeck_out_valid), .data_out (simeck_data_out)
  );
endmodule
