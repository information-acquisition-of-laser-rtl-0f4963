// key_filter: de-glitch filter for one encoder phase (A or B).
//
// The input passes through a three-stage flip-flop chain (dff[3:1]): two
// stages bring it into the clock domain, and the XOR of the last two stages
// flags every change of the synchronised input. A small state machine
// starts timing on such a change: in KF_IDLE the stability counter stays
// at zero; a change moves it to KF_COUNT, where the counter runs and every
// further change clears it again. When the input has held its level for
// STABLE_CYCLES consecutive clocks, key_out is loaded with that level and
// the machine returns to KF_IDLE. A pulse or burr shorter than
// STABLE_CYCLES clocks therefore never reaches key_out: after it ends, the
// level that is loaded is the old one.
//
// What follows the original design: the dff[3..1] chain, the 17-bit
// counter with adder and clear multiplexer, the comparator that loads
// key_out from the flip-flop chain, the XOR that feeds the state block, and
// the state block's idle output. The default of
// STABLE_CYCLES = 10000 system clocks is one period of the 1 kHz
// synchronisation clock: the original filter removes glitches shorter than
// one period of that clock, and this design meets that by timing them at
// 10 MHz. The exact compare constant, the two states and the reset values
// are its own choices.
//
// Timing: a clean level change reaches key_out 2 + STABLE_CYCLES + 1 clocks
// after it reaches key_in (two synchroniser stages, the stability count,
// one output register).
module key_filter #(
  parameter int unsigned CNT_W         = 17,
  parameter int unsigned STABLE_CYCLES = encoder_pkg::CLK_HZ / encoder_pkg::SYNC_HZ
) (
  input  logic clk,
  input  logic rst_n,      // synchronous, active low
  input  logic key_in,     // raw phase input, asynchronous
  output logic key_out,    // filtered phase
  output logic idle        // 1 while no stability count is running
);
  import encoder_pkg::*;

  logic [3:1]       dff;
  logic [CNT_W-1:0] cnt;
  filt_state_t      state;
  logic             change;   // synchronised input changed this clock
  logic             stable;   // level has been held long enough

  assign change = dff[3] ^ dff[2];
  assign stable = (cnt == CNT_W'(STABLE_CYCLES - 1));
  assign idle   = (state == KF_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dff     <= '0;
      cnt     <= '0;
      state   <= KF_IDLE;
      key_out <= 1'b0;
    end else begin
      dff <= {dff[2:1], key_in};
      unique case (state)
        KF_IDLE: begin
          cnt <= '0;
          if (change) state <= KF_COUNT;
        end
        KF_COUNT: begin
          if (change) begin
            cnt <= '0;
          end else if (stable) begin
            key_out <= dff[3];
            state   <= KF_IDLE;
            cnt     <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= KF_IDLE;
      endcase
    end
  end

  initial assert (STABLE_CYCLES >= 1 && STABLE_CYCLES <= (1 << CNT_W))
    else $error("key_filter: STABLE_CYCLES does not fit CNT_W");

endmodule
