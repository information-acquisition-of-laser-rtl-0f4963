// encoder_model: behavioural model of one incremental encoder read head as
// seen after its line receivers: quadrature phases a and b and reference
// mark z. step(dir) moves a quarter line (+1 clockwise: AB 00-10-11-01,
// -1 reverse), optionally bouncing before it settles and optionally
// followed by a short glitch on the other phase; every bounce and glitch
// lasts less than GLITCH_MAX clocks. ref_mark() raises z for a few clocks
// and sets the position to zero. The model keeps the intended position
// modulo CNT_ALL+1 and a history of (settle clock, position) pairs so a
// checker can ask what position a counter with a given delay held at a
// given clock (pos_at), and whether that clock is too close to a change to
// tell (near_change). DELAY is the clocks from a settled phase change to the
// counter update (filter plus decoder); a reference mark acts after Z_DELAY
// clocks. Holds must be longer than DELAY so the history stays in order.
module encoder_model #(
  parameter int unsigned CNT_ALL    = 15_743_999,
  parameter int unsigned GLITCH_MAX = 100,
  parameter int unsigned DELAY      = 10004,
  parameter int unsigned Z_DELAY    = 3
) (
  input  logic clk,
  output logic a,
  output logic b,
  output logic z
);
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint pos = 0;
  int     ph  = 0;
  longint hist_t[$];
  longint hist_p[$];
  int     n_up = 0, n_dn = 0, n_bounce = 0, n_glitch = 0, n_zero = 0;
  int     n_wrap_lo = 0, n_wrap_hi = 0;

  initial begin
    a = 1'b0; b = 1'b0; z = 1'b0;
    hist_t.push_back(0);
    hist_p.push_back(0);
  end

  function automatic logic [1:0] levels_of(input int p);
    case (p & 3)
      0: return 2'b00;
      1: return 2'b10;
      2: return 2'b11;
      default: return 2'b01;
    endcase
  endfunction

  task automatic step(input int dir, input int hold, input bit bounce, input bit glitch);
    logic [1:0] from, to;
    from = levels_of(ph);
    ph   = ph + dir + 4;
    to   = levels_of(ph);
    if (bounce) begin
      n_bounce++;
      for (int i = 0; i < 1 + $urandom % 4; i++) begin
        {a, b} <= to;   repeat (1 + $urandom % (GLITCH_MAX - 1)) @(posedge clk);
        {a, b} <= from; repeat (1 + $urandom % (GLITCH_MAX - 1)) @(posedge clk);
      end
    end
    {a, b} <= to;
    if (dir > 0) begin
      n_up++;
      if (pos == longint'(CNT_ALL)) n_wrap_hi++;
    end else begin
      n_dn++;
      if (pos == 0) n_wrap_lo++;
    end
    pos = (pos + longint'(dir) + longint'(CNT_ALL) + 1) % (longint'(CNT_ALL) + 1);
    hist_t.push_back(cyc + DELAY);
    hist_p.push_back(pos);
    repeat (hold) @(posedge clk);
    if (glitch) begin
      n_glitch++;
      if (from[1] == to[1]) a <= ~a; else b <= ~b;
      repeat (1 + $urandom % (GLITCH_MAX - 1)) @(posedge clk);
      {a, b} <= to;
      repeat (hold) @(posedge clk);
    end
  endtask

  task automatic ref_mark(input int hold);
    z <= 1'b1;
    pos = 0;
    n_zero++;
    hist_t.push_back(cyc + Z_DELAY);
    hist_p.push_back(0);
    repeat (8) @(posedge clk);
    z <= 1'b0;
    repeat (hold) @(posedge clk);
  endtask

  // position the counter holds after clock t
  function automatic longint pos_at(input longint t);
    longint p = 0;
    foreach (hist_t[i]) if (hist_t[i] <= t) p = hist_p[i];
    return p;
  endfunction

  // the counter changes within margin clocks of t
  function automatic bit near_change(input longint t, input longint margin);
    foreach (hist_t[i])
      if (hist_t[i] >= t - margin && hist_t[i] <= t + margin) return 1'b1;
    return 1'b0;
  endfunction
endmodule
