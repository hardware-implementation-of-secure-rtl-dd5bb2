// tb_led_mixcol32: checks the two-column MixColumnsSerial unit against the
// reference that applies the companion matrix A four times (lwc_ref_pkg),
// for 2000 random inputs and for single-nibble inputs that expose each
// matrix entry.
module tb_led_mixcol32;
  import lwc_pkg::*;
  import lwc_ref_pkg::*;

  word_t din, dout;
  int    checks = 0, failures = 0;

  led_mixcol32 dut (.*);

  // Build a 64-bit state whose columns 0 and 1 are din's two columns and
  // mix it with the reference; return columns 0 and 1.
  function automatic word_t model(word_t d);
    logic [63:0] s, m;
    word_t y;
    s = '0;
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 4; i++) s[60 - 16*i - 4*c +: 4] = d[16*(1-c) + 4*(3-i) +: 4];
    m = led_mix(s);
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 4; i++) y[16*(1-c) + 4*(3-i) +: 4] = m[60 - 16*i - 4*c +: 4];
    return y;
  endfunction

  initial begin
    // a 1 in row j of the left column gives column j of the matrix
    for (int j = 0; j < 4; j++) begin
      din = 32'h1 << (28 - 4*j);
      #1;
      checks++;
      if (dout[31:16] !== {LED_MDS_COL(j)}) begin
        failures++; $display("FAIL unit %0d: %h", j, dout);
      end
    end
    for (int n = 0; n < 2000; n++) begin
      din = $urandom;
      #1;
      checks++;
      if (dout !== model(din)) begin
        failures++; $display("FAIL din %h: %h expected %h", din, dout, model(din));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Columns of M = A^4 as printed in the LED specification.
  function automatic logic [15:0] LED_MDS_COL(int j);
    logic [15:0] cols [4] = '{16'h48B2, 16'h16E2, 16'h25AF, 16'h269B};
    return cols[j];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
