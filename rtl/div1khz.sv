// div1khz: derives the 1 kHz synchronisation clock from the 10 MHz system
// clock.
//
// A counter runs from 0 to DIV-1. The output clk_1khz is low for the first
// half of the count and high for the second half, so it is a square wave of
// clk / DIV with 50 % duty. tick is a one-cycle pulse in the cycle where
// clk_1khz is about to rise (counter at DIV/2-1), for logic in the same
// clock domain that wants a strobe instead of an edge.
//
// The 10 MHz to 1 kHz ratio is the original design's; the counter
// structure, the duty cycle and the synchronous active-low reset (output
// low, counter zero) are this design's choices.
//
// Timing: first rising edge of clk_1khz DIV/2 cycles after reset is
// released, then every DIV cycles.
module div1khz #(
  parameter int unsigned DIV = encoder_pkg::CLK_HZ / encoder_pkg::SYNC_HZ
) (
  input  logic clk,       // 10 MHz system clock
  input  logic rst_n,     // synchronous, active low
  output logic clk_1khz,  // 1 kHz square wave (registered)
  output logic tick       // one-cycle strobe before each rising edge
);

  localparam int unsigned W = $clog2(DIV);
  localparam int unsigned HALF = DIV / 2;

  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt      <= '0;
      clk_1khz <= 1'b0;
    end else begin
      cnt      <= (cnt == W'(DIV - 1)) ? '0 : cnt + 1'b1;
      if (cnt == W'(HALF - 1))     clk_1khz <= 1'b1;
      else if (cnt == W'(DIV - 1)) clk_1khz <= 1'b0;
    end
  end

  assign tick = rst_n && (cnt == W'(HALF - 1));

  initial assert (DIV >= 2) else $error("div1khz: DIV must be at least 2");

endmodule
