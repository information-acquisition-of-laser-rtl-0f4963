// quad_fsm: quadrature decoder state machine with x4 up/down position
// counter.
//
// Phases A and B step through AB = 00-10-11-01-00 when the encoder turns
// clockwise and 00-01-11-10-00 when it turns in reverse. The machine has
// one state per level pair (ALBL, AHBL, AHBH, ALBH) plus IDLE. Every legal
// step between neighbouring states moves the counter by one, so each of the
// four edges of one A/B cycle counts (fourfold resolution): clockwise steps
// count up, reverse steps count down. A phase that chatters back and forth
// across one edge produces equal numbers of up and down steps, so the count
// ends where it started.
//
// The counter holds the position modulo CNT_ALL+1: counting up from CNT_ALL
// gives 0, counting down from 0 gives CNT_ALL. A rising edge on the
// reference input z_in sets the count to zero (reference zero once per
// turn); it has priority over a step in the same clock.
//
// IDLE is the state after reset and holds the counter at zero. It stands
// for the level pair 00 (the filters reset to 0), so the machine stays in
// IDLE while A and B are both low, and the first level change leaves it as
// if from ALBL: 10 counts up into AHBL, 01 counts down into ALBH. A jump across two edges at once (00 <-> 11 or 10 <-> 01), which
// a legal input cannot produce, is not counted: the machine follows the
// levels and pulses skip for one clock.
//
// Following the original design: the five states and their names, the
// direction sequences, the x4 counting and the wrap value 15743999. Its own
// choices: IDLE standing for the level pair 00, the handling of double
// jumps, z_in acting on its rising edge, the synchronous reset.
//
// Timing: inputs are expected already synchronised to clk (key_filter
// outputs). A step changes count one clock after the level change; up/dn
// pulse in the same clock as the level change.
module quad_fsm #(
  parameter int unsigned CNT_ALL = encoder_pkg::CNT_ALL,
  parameter int unsigned CNT_W   = $clog2(CNT_ALL + 1)
) (
  input  logic             clk,
  input  logic             rst_n,   // synchronous, active low
  input  logic             a_in,    // filtered phase A
  input  logic             b_in,    // filtered phase B
  input  logic             z_in,    // synchronised reference pulse
  output logic [CNT_W-1:0] count,   // position, 0..CNT_ALL
  output encoder_pkg::quad_state_t state,
  output logic             up,      // clockwise step in this clock
  output logic             dn,      // reverse step in this clock
  output logic             skip,    // illegal double jump in this clock
  output logic             zero     // reference zero applied in this clock
);
  import encoder_pkg::*;

  quad_state_t next_state;
  logic        z_q;

  assign next_state = ab_to_state(a_in, b_in);
  assign zero       = z_in && !z_q;

  // Classify the move from state to next_state.
  always_comb begin
    up   = 1'b0;
    dn   = 1'b0;
    skip = 1'b0;
    unique case (state)
      QS_ALBL: begin
        up   = (next_state == QS_AHBL);
        dn   = (next_state == QS_ALBH);
        skip = (next_state == QS_AHBH);
      end
      QS_AHBL: begin
        up   = (next_state == QS_AHBH);
        dn   = (next_state == QS_ALBL);
        skip = (next_state == QS_ALBH);
      end
      QS_AHBH: begin
        up   = (next_state == QS_ALBH);
        dn   = (next_state == QS_AHBL);
        skip = (next_state == QS_ALBL);
      end
      QS_ALBH: begin
        up   = (next_state == QS_ALBL);
        dn   = (next_state == QS_AHBH);
        skip = (next_state == QS_AHBL);
      end
      default: begin  // QS_IDLE: treated as level pair 00
        up   = (next_state == QS_AHBL);
        dn   = (next_state == QS_ALBH);
        skip = (next_state == QS_AHBH);
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= QS_IDLE;
      count <= '0;
      z_q   <= 1'b0;
    end else begin
      z_q   <= z_in;
      if (!(state == QS_IDLE && next_state == QS_ALBL))
        state <= next_state;
      if (zero)
        count <= '0;
      else if (up)
        count <= (count == CNT_W'(CNT_ALL)) ? '0 : count + 1'b1;
      else if (dn)
        count <= (count == '0) ? CNT_W'(CNT_ALL) : count - 1'b1;
      else if (state == QS_IDLE)
        count <= '0;
    end
  end

  // The counter never leaves 0..CNT_ALL and never counts both ways at once.
  assert property (@(posedge clk) disable iff (!rst_n) count <= CNT_W'(CNT_ALL));
  assert property (@(posedge clk) disable iff (!rst_n) !(up && dn));

endmodule
