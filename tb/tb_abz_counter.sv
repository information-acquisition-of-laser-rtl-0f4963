// tb_abz_counter: one encoder channel end to end, with a short filter
// window (16 clocks) and a testbench-made synchronisation clock of 400
// clocks. The encoder is modelled in the testbench: each quarter step may
// bounce before it settles, and short glitches hit the phase that is not
// moving. A reference position (modulo CNT_ALL+1) is kept from the intended
// steps only; the running count must match it after every step has
// settled, glitches must never count, the Z mark must zero it, and the
// latched word must equal the position at each rising edge of the
// synchronisation clock and must not change between edges.
module tb_abz_counter;
  localparam int unsigned STABLE  = 16;
  localparam int unsigned SYNC_P  = 400;
  localparam int unsigned CNT_ALL = encoder_pkg::CNT_ALL;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clk_1khz = 1'b0;
  logic a = 1'b0, b = 1'b0, z = 1'b0;
  logic [31:0] signal, count;
  encoder_pkg::quad_state_t state;
  int   checks = 0, failures = 0;
  longint pos = 0;
  int   n_latch = 0, n_glitch = 0, n_bounce = 0;

  abz_counter #(.STABLE_CYCLES(STABLE)) dut (
    .clk, .rst_n, .clk_1khz, .a_pulse(a), .b_pulse(b), .z_pulse(z),
    .signal, .count, .state);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // synchronisation clock
  initial forever begin
    repeat (SYNC_P / 2) @(posedge clk);
    clk_1khz <= ~clk_1khz;
  end

  // latch check: the word changes only right after a rising edge of the
  // synchronisation clock and then equals the running count of that edge
  logic        sync_q = 1'b0;
  logic [31:0] sig_q = '0, cnt_at_edge = '0;
  logic        edge_seen = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (edge_seen) begin
      check(signal == cnt_at_edge, $sformatf("latched %0d vs %0d", signal, cnt_at_edge));
      n_latch++;
    end else begin
      check(signal == sig_q, "latched word steady between edges");
    end
    edge_seen   <= clk_1khz && !sync_q;
    cnt_at_edge <= count;
    sync_q      <= clk_1khz;
    sig_q       <= signal;
  end

  function automatic logic [1:0] levels_of(input int ph);
    case (ph & 3)
      0: return 2'b00;
      1: return 2'b10;
      2: return 2'b11;
      default: return 2'b01;
    endcase
  endfunction

  int ph = 0;
  task automatic step(input int dir);
    logic [1:0] from, to;
    from = levels_of(ph);
    ph   = ph + dir + 4;
    to   = levels_of(ph);
    // optional bounce between the old and new level
    if ($urandom % 3 == 0) begin
      n_bounce++;
      for (int i = 0; i < 1 + $urandom % 4; i++) begin
        {a, b} <= to;   repeat (1 + $urandom % (STABLE - 4)) @(posedge clk);
        {a, b} <= from; repeat (1 + $urandom % (STABLE - 4)) @(posedge clk);
      end
    end
    {a, b} <= to;
    pos = (pos + longint'(dir) + longint'(CNT_ALL) + 1) % (longint'(CNT_ALL) + 1);
    repeat (STABLE + 8) @(posedge clk);
    // glitch on the phase that did not move
    if ($urandom % 4 == 0) begin
      n_glitch++;
      if (from[1] == to[1]) a <= ~a; else b <= ~b;
      repeat (1 + $urandom % (STABLE - 4)) @(posedge clk);
      {a, b} <= to;
      repeat (STABLE + 8) @(posedge clk);
    end
    #1 check(count == 32'(pos), $sformatf("count %0d expected %0d", count, pos));
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (10) @(posedge clk);
    check(count == 0, "count zero after reset");
    // reverse from zero: wraps to CNT_ALL
    step(-1);
    check(count == 32'(CNT_ALL), "wrap below zero");
    step(+1);
    for (int i = 0; i < 400; i++) step(($urandom % 3 == 0) ? -1 : +1);
    // hold still over two latch edges: word equals position
    repeat (2 * SYNC_P + 10) @(posedge clk);
    #1 check(signal == 32'(pos), $sformatf("held word %0d expected %0d", signal, pos));
    // reference mark zeroes the count
    z <= 1'b1;
    repeat (6) @(posedge clk);
    z <= 1'b0;
    pos = 0;
    #1 check(count == 0, "Z zeroes count");
    for (int i = 0; i < 20; i++) step(+1);
    check(count == 20, "count after Z");
    repeat (SYNC_P + 10) @(posedge clk);
    check(signal == 20, "latched after Z");
    check(n_latch >= 10 && n_glitch > 0 && n_bounce > 0,
          $sformatf("latches %0d glitches %0d bounces %0d", n_latch, n_glitch, n_bounce));
    $display("latches=%0d glitches=%0d bounces=%0d", n_latch, n_glitch, n_bounce);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
