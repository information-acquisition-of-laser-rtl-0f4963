// tb_key_filter: checks the de-glitch filter with a short stability window.
// Drives glitches of 1 .. STABLE cycles (must be rejected), then clean level
// changes (must pass with a latency of STABLE + 3 clocks from the clock that
// first samples the new level), a bouncing edge (must settle once) and
// compares key_out every clock with a reference model of "output takes the
// synchronised input once it has held for STABLE clocks".
module tb_key_filter;
  localparam int unsigned STABLE = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic key_in = 1'b0, key_out, idle;
  int   checks = 0, failures = 0;

  key_filter #(.STABLE_CYCLES(STABLE)) dut (.clk, .rst_n, .key_in, .key_out, .idle);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: synchroniser of two stages, then a run-length counter of
  // the synchronised level; output takes the level after it has been seen
  // STABLE + 1 times in a row while differing from the output.
  logic [1:0] s;
  logic       ref_out;
  int         run;
  int         out_changes;
  logic       prev_out;
  always @(posedge clk) begin
    if (!rst_n) begin
      s <= '0; ref_out <= 1'b0; run = 0;
    end else begin
      s <= {s[0], key_in};
      if (s[1] != ref_out) begin
        run = run + 1;
        if (run == STABLE + 1) begin
          ref_out <= s[1];
          run = 0;
        end
      end else run = 0;
      // a change of the level restarts the run
      if (s[1] != s[0] && s[1] != ref_out) run = 0;
    end
  end

  always @(negedge clk) if (rst_n) begin
    check(key_out == ref_out, $sformatf("key_out %0b ref %0b at %0t", key_out, ref_out, $time));
    if (key_out != prev_out) out_changes++;
    prev_out = key_out;
  end

  task automatic pulse(input logic lvl, input int len);
    key_in <= lvl;
    repeat (len) @(posedge clk);
    key_in <= ~lvl;
  endtask

  int t0, lat;
  initial begin
    out_changes = 0; prev_out = 1'b0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    // glitches high from a low output
    for (int len = 1; len <= STABLE; len++) begin
      pulse(1'b1, len);
      repeat (STABLE + 10) @(posedge clk);
      check(key_out == 1'b0, $sformatf("glitch of %0d rejected", len));
    end
    check(out_changes == 0, "no output change during glitches");
    // clean rising edge, latency
    @(posedge clk);
    key_in <= 1'b1;
    t0 = 0; lat = 0;
    while (key_out == 1'b0 && lat < 10 * STABLE) begin
      @(posedge clk); #1; lat++;
    end
    check(lat == STABLE + 3, $sformatf("rise latency %0d clocks", lat));
    // glitches low from a high output
    for (int len = 1; len <= STABLE; len += 3) begin
      pulse(1'b0, len);
      repeat (STABLE + 10) @(posedge clk);
      check(key_out == 1'b1, $sformatf("low glitch of %0d rejected", len));
    end
    // bouncing falling edge: toggles of random short length, then stable
    for (int i = 0; i < 12; i++) begin
      key_in <= ~key_in;
      repeat (1 + ($urandom % (STABLE - 1))) @(posedge clk);
    end
    key_in <= 1'b0;
    repeat (3 * STABLE) @(posedge clk);
    check(key_out == 1'b0, "settled low after bounce");
    // random activity against the model
    for (int i = 0; i < 300; i++) begin
      key_in <= $urandom % 2;
      repeat (1 + ($urandom % (2 * STABLE))) @(posedge clk);
    end
    repeat (3 * STABLE) @(posedge clk);
    check(key_out == key_in, "final level");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
