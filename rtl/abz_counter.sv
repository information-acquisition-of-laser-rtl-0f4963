// abz_counter: one complete encoder channel (A, B and reference Z inputs to
// a latched 32-bit position word).
//
// Phases A and B each pass through a key_filter, which removes glitches
// shorter than one 1 kHz period, and then drive quad_fsm, the five-state
// decoder that counts all four edges of a quadrature cycle up or down
// modulo CNT_ALL+1. The reference pulse Z is brought into the clock domain
// by two flip-flops and zeroes the count on its rising edge.
//
// The running count is copied into the output latch signal on every rising
// edge of the 1 kHz synchronisation clock clk_1khz, so both channels of the
// system publish positions taken at the same instant and the word stays
// steady for a whole millisecond between updates.
//
// Following the original design: the port set (10 MHz clock, 1 kHz clock,
// A/B/Z pulses, 32-bit signal), filters on A and B, the wrap value and the
// latch triggered by the synchronisation clock. Its own choices: no filter
// on Z (only a synchroniser), sampling clk_1khz with one register and
// latching on its rising edge, the synchronous reset.
//
// Timing: signal updates one clock after clk_1khz is seen high for the
// first time; count lags the raw A/B levels by the filter delay
// (STABLE_CYCLES + 3 clocks) plus one clock.
module abz_counter #(
  parameter int unsigned CNT_ALL       = encoder_pkg::CNT_ALL,
  parameter int unsigned STABLE_CYCLES = encoder_pkg::CLK_HZ / encoder_pkg::SYNC_HZ,
  parameter int unsigned SIG_W         = encoder_pkg::SIG_W
) (
  input  logic             clk,        // 10 MHz system clock
  input  logic             rst_n,      // synchronous, active low
  input  logic             clk_1khz,   // synchronisation clock, same domain
  input  logic             a_pulse,    // encoder phase A, asynchronous
  input  logic             b_pulse,    // encoder phase B, asynchronous
  input  logic             z_pulse,    // encoder reference mark, asynchronous
  output logic [SIG_W-1:0] signal,     // latched position
  output logic [SIG_W-1:0] count,      // running position (monitor)
  output encoder_pkg::quad_state_t state  // decoder state (monitor)
);
  import encoder_pkg::*;

  localparam int unsigned CNT_W = $clog2(CNT_ALL + 1);

  logic             a_f, b_f;
  logic             a_idle, b_idle;
  logic [1:0]       z_sync;
  logic             sync_q;
  logic [CNT_W-1:0] abz_cnt;
  logic             up, dn, skip, zero;

  key_filter #(.STABLE_CYCLES(STABLE_CYCLES)) u_filt_a (
    .clk, .rst_n, .key_in(a_pulse), .key_out(a_f), .idle(a_idle)
  );
  key_filter #(.STABLE_CYCLES(STABLE_CYCLES)) u_filt_b (
    .clk, .rst_n, .key_in(b_pulse), .key_out(b_f), .idle(b_idle)
  );

  quad_fsm #(.CNT_ALL(CNT_ALL), .CNT_W(CNT_W)) u_fsm (
    .clk, .rst_n, .a_in(a_f), .b_in(b_f), .z_in(z_sync[1]),
    .count(abz_cnt), .state, .up, .dn, .skip, .zero
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z_sync <= '0;
      sync_q <= 1'b0;
      signal <= '0;
    end else begin
      z_sync <= {z_sync[0], z_pulse};
      sync_q <= clk_1khz;
      if (clk_1khz && !sync_q) signal <= SIG_W'(abz_cnt);
    end
  end

  assign count = SIG_W'(abz_cnt);

  initial assert (SIG_W >= CNT_W) else $error("abz_counter: SIG_W too narrow");

endmodule
