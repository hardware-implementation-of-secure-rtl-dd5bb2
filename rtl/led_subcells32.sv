// led_subcells32: the 32-bit "row half" of an LED-128 round, combinational.
//
// Takes two rows of the 4x4 nibble state (upper row in din[31:16], its cell
// in column 0 in the top nibble) and applies, in this order:
//   AddRoundKey  - XOR of the selected 32-bit key word when add_key is set
//                  (first round of each four-round step),
//   AddConstants - column 0 gets (row index XOR key-size nibble), where the
//                  key-size byte 0x80 gives 8 for rows 0-1 and 0 for rows 2-3;
//                  column 1 gets rc[5:3] in rows 0 and 2, rc[2:0] in rows 1
//                  and 3,
//   SubCells     - eight 4-bit PRESENT S-boxes.
// lower = 0 selects rows 0-1, lower = 1 rows 2-3. Two uses (two cycles)
// cover the whole state, which is how the 32-bit serial datapath of the
// original LED-128 architecture shares one 32-bit S-box layer.
module led_subcells32
  import lwc_pkg::*;
(
  input  word_t      din,
  input  word_t      key_word,
  input  logic       add_key,
  input  logic       lower,
  input  logic [5:0] rc,
  output word_t      dout
);
  word_t x;

  always_comb begin
    x = din ^ (add_key ? key_word : '0);
    // column 0 of the two rows: row index XOR key-size nibble
    x[31:28] ^= lower ? 4'h2 : 4'h8;
    x[15:12] ^= lower ? 4'h3 : 4'h9;
    // column 1: round constant halves
    x[27:24] ^= {1'b0, rc[5:3]};
    x[11:8]  ^= {1'b0, rc[2:0]};
    for (int i = 0; i < 8; i++) dout[4*i +: 4] = present_sbox(x[4*i +: 4]);
  end
endmodule
