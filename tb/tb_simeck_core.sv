// tb_simeck_core: self-checking testbench of the SIMECK 64/128 core.
//
// Encrypts the published test vector and 40 random blocks, comparing each
// ciphertext with the behavioural model in lwc_ref_pkg. Load words are sent
// with random idle gaps, in_valid is also raised while the core is busy
// (those words must be ignored), and the number of cycles between the last
// load word and the first output word must equal the 44-cycle latency.
// The two output words must arrive on consecutive cycles, low word first.
// Finally a reset in the middle of a block must return the core to its load
// state, after which it encrypts correctly.
module tb_simeck_core;
  import lwc_pkg::*;
  import lwc_ref_pkg::*;

  localparam int unsigned LAT = 44;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, in_ready, busy, out_valid;
  word_t data_in = '0, key_in = '0, data_out;
  int    checks = 0, failures = 0;

  simeck_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic encrypt(input logic [63:0] pt, input logic [127:0] key,
                         input logic [63:0] expect_ct, input bit gaps, input bit poke);
    int cycles;
    logic [63:0] ct;
    for (int w = 0; w < 4; w++) begin
      if (gaps) begin
        int g = $urandom_range(0, 2);
        repeat (g) begin
          @(negedge clk);
          in_valid = 1'b0;
          data_in  = $urandom;
          key_in   = $urandom;
        end
      end
      @(negedge clk);
      check(in_ready, "in_ready while loading");
      in_valid = 1'b1;
      key_in   = key[32*w +: 32];
      data_in  = (w < 2) ? pt[32*w +: 32] : $urandom;
    end
    @(negedge clk);
    in_valid = poke;           // words offered while busy must be ignored
    data_in  = $urandom;
    key_in   = $urandom;
    cycles   = 0;
    check(busy && !in_ready, "busy after the fourth load word");
    while (!out_valid && cycles < 10000) begin
      if (busy) cycles++;
      @(negedge clk);
    end
    in_valid = 1'b0;
    check(cycles == LAT, $sformatf("busy cycles %0d, expected %0d", cycles, LAT));
    ct[31:0] = data_out;
    @(negedge clk);
    check(out_valid, "second output word valid");
    ct[63:32] = data_out;
    check(ct == expect_ct, $sformatf("pt %h key %h: ct %h expected %h", pt, key, ct, expect_ct));
    @(negedge clk);
    check(!out_valid && in_ready, "back to load after two output words");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(in_ready && !busy && !out_valid, "idle after reset");
    encrypt(64'h656b696c20646e75, 128'h1b1a1918131211100b0a090803020100, 64'h45ce69025f7ab7ed, 1'b0, 1'b0);
    check(simeck_enc(64'h656b696c20646e75, 128'h1b1a1918131211100b0a090803020100) == 64'h45ce69025f7ab7ed, "reference model matches the published vector");
    for (int n = 0; n < 40; n++) begin
      logic [63:0]  pt;
      logic [127:0] key;
      pt  = {$urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      encrypt(pt, key, simeck_enc(pt, key), n[0], n[1]);
    end
    // Reset in the middle of a block: the core must return to its load
    // state at once and then encrypt the next block correctly.
    for (int w = 0; w < 4; w++) begin
      @(negedge clk);
      in_valid = 1'b1;
      key_in   = $urandom;
      data_in  = $urandom;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT / 2) @(negedge clk);
    check(busy, "busy before the reset");
    rst_n = 1'b0;
    #1;
    check(in_ready && !busy && !out_valid, "load state during reset");
    @(negedge clk);
    rst_n = 1'b1;
    encrypt(64'h656b696c20646e75, 128'h1b1a1918131211100b0a090803020100, 64'h45ce69025f7ab7ed, 1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
