// tb_simeck_keygen: loads random 128-bit keys (least significant word first),
// steps the simeck key schedule 44 times and compares every round key with the
// reference schedule of lwc_ref_pkg. Between keys it holds load and step low
// for a few cycles and checks that the round key does not move.
module tb_simeck_keygen;
  import lwc_pkg::*;
  import lwc_ref_pkg::*;

  logic  clk = 1'b0, load = 1'b0, step = 1'b0;
  word_t key_in = '0, rk;

  int    checks = 0, failures = 0;

  simeck_keygen dut (
    .clk       (clk),
    .load      (load),
    .step      (step),

    .key_in    (key_in),
    .rk        (rk)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] key;
    logic [31:0]  ks [44];
    word_t        held;
    for (int n = 0; n < 30; n++) begin
      key = (n == 0) ? 128'h1b1a1918131211100b0a090803020100
                     : {$urandom, $urandom, $urandom, $urandom};
      simeck_keys(key, ks);
      for (int w = 0; w < 4; w++) begin
        @(negedge clk);
        load = 1'b1; key_in = key[32*w +: 32];
      end
      @(negedge clk);
      load = 1'b0;
      for (int i = 0; i < 44; i++) begin
        checks++;
        if (rk !== ks[i]) begin
          failures++; $display("FAIL key %h round %0d: %h expected %h", key, i, rk, ks[i]);
        end

        step = 1'b1;
        @(negedge clk);
        step = 1'b0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);   // idle cycle
      end
      held = rk;
      repeat (3) @(negedge clk);
      checks++;
      if (rk !== held) begin failures++; $display("FAIL key moved while idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
