// tb_lwc_top: end-to-end test of the three cores in lwc_top, at the default
// parameters. Three agents (lwc_core_agent) run concurrently, one per core,
// each encrypting 30 blocks checked against the reference models, including
// the LED-128 published vector. It counts the situations the design has to
// handle and fails if any never happened: loads with idle gaps, back-to-back
// blocks, in_valid raised while busy, LED key additions with K1 and with K2,
// and all three cores computing in the same cycle.
module tb_lwc_top;
  import lwc_pkg::*;

  localparam int NBLK = 30;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic  led_in_valid, led_in_ready, led_busy, led_out_valid;
  logic  simon_in_valid, simon_in_ready, simon_busy, simon_out_valid;
  logic  simeck_in_valid, simeck_in_ready, simeck_busy, simeck_out_valid;
  word_t led_data_in, led_key_in, led_data_out;
  word_t simon_data_in, simon_key_in, simon_data_out;
  word_t simeck_data_in, simeck_key_in, simeck_data_out;

  logic  done [3];
  int    a_checks [3], a_fail [3], a_gaps [3], a_b2b [3], a_pokes [3];
  int    checks = 0, failures = 0;
  int    k1_adds = 0, k2_adds = 0, all_busy = 0;

  lwc_top dut (.*);

  lwc_core_agent #(.CIPHER(0), .LAT(4 * LED_ROUNDS), .NBLK(NBLK)) u_led_agent (
    .clk, .start, .in_valid (led_in_valid), .data_in (led_data_in), .key_in (led_key_in),
    .in_ready (led_in_ready), .busy (led_busy), .out_valid (led_out_valid),
    .data_out (led_data_out), .done (done[0]), .checks (a_checks[0]), .failures (a_fail[0]),
    .gap_loads (a_gaps[0]), .b2b_loads (a_b2b[0]), .busy_pokes (a_pokes[0]));

  lwc_core_agent #(.CIPHER(1), .LAT(SIMON_ROUNDS), .NBLK(NBLK)) u_simon_agent (
    .clk, .start, .in_valid (simon_in_valid), .data_in (simon_data_in), .key_in (simon_key_in),
    .in_ready (simon_in_ready), .busy (simon_busy), .out_valid (simon_out_valid),
    .data_out (simon_data_out), .done (done[1]), .checks (a_checks[1]), .failures (a_fail[1]),
    .gap_loads (a_gaps[1]), .b2b_loads (a_b2b[1]), .busy_pokes (a_pokes[1]));

  lwc_core_agent #(.CIPHER(2), .LAT(SIMECK_ROUNDS), .NBLK(NBLK)) u_simeck_agent (
    .clk, .start, .in_valid (simeck_in_valid), .data_in (simeck_data_in), .key_in (simeck_key_in),
    .in_ready (simeck_in_ready), .busy (simeck_busy), .out_valid (simeck_out_valid),
    .data_out (simeck_data_out), .done (done[2]), .checks (a_checks[2]), .failures (a_fail[2]),
    .gap_loads (a_gaps[2]), .b2b_loads (a_b2b[2]), .busy_pokes (a_pokes[2]));

  always #5 clk = ~clk;

  // Count LED step-key additions (first round of a step, rows 0-1 phase).
  always @(posedge clk) if (rst_n) begin
    if (dut.u_led.run && dut.u_led.phase == 2'd0 && dut.u_led.round[1:0] == 2'd0) begin
      if (dut.u_led.round[2]) k2_adds++;
      else                    k1_adds++;
    end
    if (led_busy && simon_busy && simeck_busy) all_busy++;
  end

  task automatic need(input int count, input string what);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
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
    $display("events:");
    for (int i = 0; i < 3; i++) begin
      need(a_gaps[i],  $sformatf("core %0d loads with idle gaps", i));
      need(a_b2b[i],   $sformatf("core %0d back-to-back blocks", i));
      need(a_pokes[i], $sformatf("core %0d in_valid while busy", i));
    end
    need(k1_adds, "LED K1 step additions");
    need(k2_adds, "LED K2 step additions");
    need(all_busy, "cycles with all three cores busy");
    // 12 steps per block alternate K1, K2: six of each per block.
    checks++;
    if (k1_adds != 6 * NBLK || k2_adds != 6 * NBLK) begin
      failures++;
      $display("FAIL: K1/K2 additions %0d/%0d, expected %0d each", k1_adds, k2_adds, 6 * NBLK);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
