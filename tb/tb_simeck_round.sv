// tb_simeck_round: checks the combinational simeck round against its formula
// for 2000 random inputs, then chains 44 rounds with the reference key
// schedule and compares with the published 64/128 ciphertext.
module tb_simeck_round;
  import lwc_pkg::*;
  import lwc_ref_pkg::*;

  word_t l, r, k, l_next, r_next;
  int    checks = 0, failures = 0;

  simeck_round dut (.*);

  initial begin
    logic [31:0] ks [44];
    word_t       nl, nr;
    for (int n = 0; n < 2000; n++) begin
      l = $urandom; r = $urandom; k = $urandom;
      #1;
      checks++;
      if (l_next !== (r ^ (l & rl(l, 5)) ^ rl(l, 1) ^ k) || r_next !== l) begin
        failures++; $display("FAIL l %h r %h k %h: %h %h", l, r, k, l_next, r_next);
      end
    end
    simeck_keys(128'h1b1a1918131211100b0a090803020100, ks);
    l = 32'h656b696c; r = 32'h20646e75;
    for (int i = 0; i < 44; i++) begin
      k = ks[i];
      #1;
      nl = l_next;
      nr = r_next;
      l  = nl;
      r  = nr;
    end
    checks++;
    if ({l, r} !== 64'h45ce69025f7ab7ed) begin
      failures++; $display("FAIL test vector: %h%h", l, r);
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
