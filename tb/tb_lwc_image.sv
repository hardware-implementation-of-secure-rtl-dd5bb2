// tb_lwc_image: image-encryption workload on lwc_top at default parameters.
//
// Each of the three cores encrypts the same generated 256x256 8-bit
// greyscale image (8192 blocks, one key, blocks encrypted independently)
// through the top, all three running concurrently. lwc_image_agent checks
// every block against the reference model, the busy cycles per block, and
// that the cipher images have near-8-bit entropy and near-zero correlation
// of adjacent pixels while the plain image does not.
module tb_lwc_image;
  import lwc_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic  led_in_valid, led_in_ready, led_busy, led_out_valid;
  logic  simon_in_valid, simon_in_ready, simon_busy, simon_out_valid;
  logic  simeck_in_valid, simeck_in_ready, simeck_busy, simeck_out_valid;
  word_t led_data_in, led_key_in, led_data_out;
  word_t simon_data_in, simon_key_in, simon_data_out;
  word_t simeck_data_in, simeck_key_in, simeck_data_out;

  logic  done [3];
  int    a_checks [3], a_fail [3];
  int    checks = 0, failures = 0;

  lwc_top dut (.*);

  lwc_image_agent #(.CIPHER(0), .LAT(4 * LED_ROUNDS), .NAME("LED-128")) u_led_agent (
    .clk, .start, .in_valid (led_in_valid), .data_in (led_data_in), .key_in (led_key_in),
    .in_ready (led_in_ready), .busy (led_busy), .out_valid (led_out_valid),
    .data_out (led_data_out), .done (done[0]), .checks (a_checks[0]), .failures (a_fail[0]));

  lwc_image_agent #(.CIPHER(1), .LAT(SIMON_ROUNDS), .NAME("SIMON 64/128")) u_simon_agent (
    .clk, .start, .in_valid (simon_in_valid), .data_in (simon_data_in), .key_in (simon_key_in),
    .in_ready (simon_in_ready), .busy (simon_busy), .out_valid (simon_out_valid),
    .data_out (simon_data_out), .done (done[1]), .checks (a_checks[1]), .failures (a_fail[1]));

  lwc_image_agent #(.CIPHER(2), .LAT(SIMECK_ROUNDS), .NAME("SIMECK 64/128")) u_simeck_agent (
    .clk, .start, .in_valid (simeck_in_valid), .data_in (simeck_data_in), .key_in (simeck_key_in),
    .in_ready (simeck_in_ready), .busy (simeck_busy), .out_valid (simeck_out_valid),
    .data_out (simeck_data_out), .done (done[2]), .checks (a_checks[2]), .failures (a_fail[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    wait (done[0] && done[1] && done[2]);
    for (int i = 0; i < 3; i++) begin
      checks   += a_checks[i];
      failures += a_fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
