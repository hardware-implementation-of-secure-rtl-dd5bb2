// led_mixcol32: LED MixColumnsSerial on two state columns, combinational.
//
// din holds two 4-nibble columns: the left one in din[31:16], the right one
// in din[15:0], each with its row-0 cell in the top nibble. Every column is
// multiplied by the MDS matrix M = A^4 over GF(2^4) (x^4 + x + 1):
//   [4 1 2 2; 8 6 5 6; B E A 9; 2 2 F B].
// The four serial A-steps of the specification are folded into one matrix
// product here, so two columns (32 bits) are mixed per cycle and the full
// state in two cycles.
module led_mixcol32
  import lwc_pkg::*;
(
  input  word_t din,
  output word_t dout
);
  always_comb begin
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < 4; i++) begin
        logic [3:0] acc;
        acc = '0;
        for (int j = 0; j < 4; j++)
          acc ^= gf16_mul(LED_MDS[i][j], din[16*(1-c) + 4*(3-j) +: 4]);
        dout[16*(1-c) + 4*(3-i) +: 4] = acc;
      end
    end
  end
endmodule
