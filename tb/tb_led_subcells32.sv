// tb_led_subcells32: checks the LED AddRoundKey/AddConstants/SubCells half
// against a nibble-by-nibble model (S-box table from lwc_ref_pkg) for both
// row halves, with and without key addition, over 2000 random inputs; it
// also checks that one all-zero input gives the hand-computed result.
module tb_led_subcells32;
  import lwc_pkg::*;
  import lwc_ref_pkg::*;

  word_t      din, key_word, dout;
  logic       add_key, lower;
  logic [5:0] rc;
  int         checks = 0, failures = 0;

  led_subcells32 dut (.*);

  function automatic word_t model(word_t d, word_t k, bit ak, bit lo, logic [5:0] c);
    logic [3:0] nib, x;
    word_t y;
    for (int row = 0; row < 2; row++)
      for (int col = 0; col < 4; col++) begin
        int pos = 28 - 16*row - 4*col;
        int grow = 2*int'(lo) + row;          // row of the full state
        nib = d[pos +: 4] ^ (ak ? k[pos +: 4] : 4'h0);
        if (col == 0) nib ^= 4'(grow) ^ (grow < 2 ? 4'h8 : 4'h0);
        if (col == 1) nib ^= (grow % 2 == 0) ? {1'b0, c[5:3]} : {1'b0, c[2:0]};
        x = SB[nib];
        y[pos +: 4] = x;
      end
    return y;
  endfunction

  initial begin
    #1 ;
    din = '0; key_word = '0; add_key = 0; lower = 0; rc = 6'h01;
    #1;
    // rows 0-1 of zero state, rc=01: cells (8,0,0,0 / 9,1,0,0) -> S-box
    checks++;
    if (dout !== 32'h3CCC_E5CC) begin failures++; $display("FAIL zero: %h", dout); end
    for (int n = 0; n < 2000; n++) begin
      din = $urandom; key_word = $urandom; add_key = $urandom; lower = $urandom;
      rc = 6'($urandom);
      #1;
      checks++;
      if (dout !== model(din, key_word, add_key, lower, rc)) begin
        failures++;
        $display("FAIL din %h key %h ak %0d lo %0d rc %h: %h", din, key_word, add_key, lower, rc, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
