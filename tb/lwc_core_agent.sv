// lwc_core_agent: testbench driver and checker for one cipher core port set.
//
// After start rises it encrypts NBLK blocks (the first one a fixed test
// vector, then random plaintexts and keys), comparing every ciphertext with
// the lwc_ref_pkg model of cipher CIPHER (0 LED-128, 1 SIMON, 2 SIMECK) and
// the busy time with LAT cycles. Blocks alternate at random between
// back-to-back loads (first word offered on the first cycle the core is back
// in load state) and loads with idle gaps; some blocks raise in_valid while
// the core is busy, which the core must ignore. It counts checks, failures
// and how often each of those situations occurred, and raises done.
module lwc_core_agent
  import lwc_pkg::*;
  import lwc_ref_pkg::*;
#(
  parameter int CIPHER = 0,
  parameter int LAT    = 44,
  parameter int NBLK   = 20
) (
  input  logic  clk,
  input  logic  start,
  output logic  in_valid,
  output word_t data_in,
  output word_t key_in,
  input  logic  in_ready,
  input  logic  busy,
  input  logic  out_valid,
  input  word_t data_out,
  output logic  done,
  output int    checks,
  output int    failures,
  output int    gap_loads,
  output int    b2b_loads,
  output int    busy_pokes
);
  function automatic logic [63:0] ref_enc(logic [63:0] pt, logic [127:0] key);
    case (CIPHER)
      0:       return led_enc(pt, key);
      1:       return simon_enc(pt, key);
      default: return simeck_enc(pt, key);
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cipher %0d: %s", CIPHER, what);
    end
  endtask

  initial begin
    in_valid = 1'b0; data_in = '0; key_in = '0;
    done = 1'b0; checks = 0; failures = 0;
    gap_loads = 0; b2b_loads = 0; busy_pokes = 0;
    wait (start);
    @(negedge clk);
    for (int n = 0; n < NBLK; n++) begin
      logic [63:0]  pt, ct;
      logic [127:0] key;
      bit           gaps, poke;
      int           cycles;
      pt   = (n == 0) ? 64'h0123456789abcdef : {$urandom, $urandom};
      key  = (n == 0) ? 128'h0123456789abcdef0123456789abcdef
                      : {$urandom, $urandom, $urandom, $urandom};
      gaps = (n % 3 == 2);
      poke = (n % 4 == 1);
      // We are at the negedge right after the previous high output word
      // (or after start): the core is in load state now.
      for (int w = 0; w < 4; w++) begin
        if (w > 0) @(negedge clk);
        if (gaps && w > 0) begin
          in_valid = 1'b0;
          repeat (1 + w % 2) @(negedge clk);
        end
        check(in_ready, "in_ready while loading");
        in_valid = 1'b1;
        key_in   = key[32*w +: 32];
        data_in  = (w < 2) ? pt[32*w +: 32] : $urandom;
      end
      if (gaps) gap_loads++;
      else if (n > 0) b2b_loads++;
      @(negedge clk);
      in_valid = poke;
      data_in  = $urandom;
      key_in   = $urandom;
      cycles   = 0;
      while (!out_valid && cycles < 10000) begin
        if (busy) begin
          cycles++;
          if (poke && !in_ready) busy_pokes += (cycles == 1);
        end
        @(negedge clk);
      end
      in_valid = 1'b0;
      check(cycles == LAT, $sformatf("busy for %0d cycles, expected %0d", cycles, LAT));
      ct[31:0] = data_out;
      @(negedge clk);
      check(out_valid, "second output word");
      ct[63:32] = data_out;
      check(ct == ref_enc(pt, key), $sformatf("block %0d: %h expected %h", n, ct, ref_enc(pt, key)));
      @(negedge clk);
    end
    check(!out_valid && in_ready, "idle at the end");
    done = 1'b1;
  end
endmodule
