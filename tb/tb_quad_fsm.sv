// tb_quad_fsm: checks the quadrature decoder and position counter at the
// default wrap value. A reference model keeps the position as an integer
// modulo CNT_ALL+1 and is stepped by the testbench's own knowledge of the
// direction of each phase change. Covered: leaving IDLE with a count, clockwise
// and reverse rotation, wrap in both directions, chatter on one edge,
// illegal double jumps (not counted), reference zeroing and a long random
// walk. The count must follow each step one clock later.
module tb_quad_fsm;
  import encoder_pkg::*;
  localparam int unsigned CNT_ALL = encoder_pkg::CNT_ALL;
  localparam int unsigned CNT_W   = $clog2(CNT_ALL + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic a = 1'b0, b = 1'b0, z = 1'b0;
  logic [CNT_W-1:0] count;
  quad_state_t state;
  logic up, dn, skip, zero;
  int   checks = 0, failures = 0;
  longint pos;                 // reference position
  int   n_up = 0, n_dn = 0, n_skip = 0, n_zero = 0;

  quad_fsm dut (.clk, .rst_n, .a_in(a), .b_in(b), .z_in(z),
                .count, .state, .up, .dn, .skip, .zero);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_up   += int'(up);
    n_dn   += int'(dn);
    n_skip += int'(skip);
    n_zero += int'(zero);
  end

  // Gray position of the levels: 00 -> 0, 10 -> 1, 11 -> 2, 01 -> 3
  function automatic int phase_of(input logic aa, input logic bb);
    case ({aa, bb})
      2'b00: return 0;
      2'b10: return 1;
      2'b11: return 2;
      default: return 3;
    endcase
  endfunction

  function automatic logic [1:0] levels_of(input int ph);
    case (ph & 3)
      0: return 2'b00;
      1: return 2'b10;
      2: return 2'b11;
      default: return 2'b01;
    endcase
  endfunction

  // Move one quarter cycle (dir = +1 clockwise, -1 reverse), wait, compare.
  task automatic step(input int dir, input int hold);
    logic [1:0] l;
    l = levels_of(phase_of(a, b) + dir + 4);
    {a, b} <= l;
    pos = (pos + longint'(dir) + longint'(CNT_ALL) + 1) % (longint'(CNT_ALL) + 1);
    repeat (2) @(posedge clk);
    #1 check(count == CNT_W'(pos), $sformatf("count %0d expected %0d", count, pos));
    repeat (hold) @(posedge clk);
  endtask

  initial begin
    pos = 0;
    repeat (3) @(posedge clk);
    #1 check(state == QS_IDLE && count == '0, "reset to IDLE, count 0");
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    #1 check(state == QS_IDLE, "stays in IDLE while AB = 00");
    check(count == '0, "count zero in IDLE");
    // state sequence clockwise: S2 S3 S4 S1
    step(+1, 0); check(state == QS_AHBL, "S2 after 10");
    step(+1, 0); check(state == QS_AHBH, "S3 after 11");
    step(+1, 0); check(state == QS_ALBH, "S4 after 01");
    step(+1, 0); check(state == QS_ALBL, "S1 after 00");
    check(count == 4, "one cycle clockwise counts 4");
    // reverse through zero: wraps to CNT_ALL
    for (int i = 0; i < 6; i++) step(-1, 1);
    check(count == CNT_W'(CNT_ALL - 1), "reverse wrap below zero");
    // forward across the wrap
    for (int i = 0; i < 3; i++) step(+1, 0);
    check(count == CNT_W'(1), "forward wrap above CNT_ALL");
    // chatter on one edge: net zero
    for (int i = 0; i < 10; i++) begin
      step(+1, 0);
      step(-1, 0);
    end
    check(count == CNT_W'(1), "chatter leaves count unchanged");
    // illegal double jump: not counted
    begin
      logic [1:0] l;
      l = levels_of(phase_of(a, b) + 2);
      {a, b} <= l;
      repeat (2) @(posedge clk);
      #1 check(count == CNT_W'(pos), "double jump not counted");
      check(n_skip == 1, "double jump flagged");
    end
    // reference zero on rising edge of z
    for (int i = 0; i < 5; i++) step(+1, 0);
    z <= 1'b1;
    pos = 0;
    repeat (2) @(posedge clk);
    #1 check(count == '0, "z rising edge zeroes count");
    // z still high: counting resumes
    step(+1, 0);
    step(+1, 0);
    z <= 1'b0;
    step(-1, 3);
    // random walk
    for (int i = 0; i < 2000; i++)
      step(($urandom % 3 == 0) ? -1 : +1, $urandom % 3);
    check(n_up > 1000 && n_dn > 500 && n_zero == 1, "mechanism counts");
    // reset mid-run returns to IDLE and zero
    rst_n <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    #1 check(count == '0 && state == QS_IDLE, "reset clears");
    // leave IDLE in reverse: first step down wraps to CNT_ALL
    {a, b} <= 2'b00;
    rst_n  <= 1'b0;
    repeat (2) @(posedge clk);
    rst_n  <= 1'b1;
    pos = 0;
    repeat (2) @(posedge clk);
    #1 check(state == QS_IDLE, "IDLE after reset with AB = 00");
    step(-1, 0);
    check(state == QS_ALBH && count == CNT_W'(CNT_ALL), "reverse step out of IDLE");
    $display("up=%0d dn=%0d skip=%0d zero=%0d", n_up, n_dn, n_skip, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
