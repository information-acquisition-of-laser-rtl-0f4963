// encoder_acq_top: angle acquisition for the two incremental encoders of a
// laser tracker (elevation "E" and azimuth "A").
//
// Each encoder delivers quadrature phases A and B and a once-per-turn
// reference mark (I, also called Z) through RS-422 receivers outside this
// design. Each set goes to an abz_counter, which filters the phases,
// decodes them into a fourfold-resolution position count (0..CNT_ALL,
// wrapping) and latches that count on every rising edge of the 1 kHz
// synchronisation clock made by div1khz from the 10 MHz system clock.
// txuart takes both latched words once per millisecond into a FIFO and
// sends them on the serial line FPGA_PSD_TX3.
//
// The wiring follows the original top-level schematic: inst8 (elevation
// inputs FPGA_E_A/B/I) drives Esignal into endataE, inst9 (azimuth inputs
// FPGA_A_A/B/I) drives Asignal into endataA, and the divider output
// CLK_OUT feeds both counters and the transmitter's readpulse. The
// transceiver enable pins are tied to their printed levels (FPGA_T_EN2_N
// low, FPGA_T_EN2 high). Not included: the vendor PLL and the LED driver of
// the original board, whose function is not described; the reset input is
// this design's addition.
//
// Timing: all logic runs on CLK_10M. Asignal/Esignal change once per
// millisecond; the serial frame of a sample starts about half a
// millisecond after the latch and lasts 7665 clocks at the defaults.
module encoder_acq_top #(
  parameter int unsigned CNT_ALL       = encoder_pkg::CNT_ALL,
  parameter int unsigned DIV           = encoder_pkg::CLK_HZ / encoder_pkg::SYNC_HZ,
  parameter int unsigned STABLE_CYCLES = encoder_pkg::CLK_HZ / encoder_pkg::SYNC_HZ,
  parameter int unsigned BAUD_DIV      = 87,
  parameter int unsigned FIFO_DEPTH    = 4
) (
  input  logic        CLK_10M,
  input  logic        rst_n,
  // elevation encoder
  input  logic        FPGA_E_A,
  input  logic        FPGA_E_B,
  input  logic        FPGA_E_I,
  // azimuth encoder
  input  logic        FPGA_A_A,
  input  logic        FPGA_A_B,
  input  logic        FPGA_A_I,
  // serial output and transceiver enables
  output logic        FPGA_PSD_TX3,
  output logic        FPGA_T_EN2_N,
  output logic        FPGA_T_EN2,
  // latched positions and status, for monitoring
  output logic [31:0] Asignal,
  output logic [31:0] Esignal,
  output logic        CLK_OUT,
  output logic        tx_busy,
  output logic        tx_dropped
);
  import encoder_pkg::*;

  logic        tick_unused;
  logic [31:0] e_count, a_count;
  quad_state_t e_state, a_state;

  div1khz #(.DIV(DIV)) inst4 (
    .clk(CLK_10M), .rst_n, .clk_1khz(CLK_OUT), .tick(tick_unused)
  );

  abz_counter #(.CNT_ALL(CNT_ALL), .STABLE_CYCLES(STABLE_CYCLES), .SIG_W(32)) inst8 (
    .clk(CLK_10M), .rst_n, .clk_1khz(CLK_OUT),
    .a_pulse(FPGA_E_A), .b_pulse(FPGA_E_B), .z_pulse(FPGA_E_I),
    .signal(Esignal), .count(e_count), .state(e_state)
  );

  abz_counter #(.CNT_ALL(CNT_ALL), .STABLE_CYCLES(STABLE_CYCLES), .SIG_W(32)) inst9 (
    .clk(CLK_10M), .rst_n, .clk_1khz(CLK_OUT),
    .a_pulse(FPGA_A_A), .b_pulse(FPGA_A_B), .z_pulse(FPGA_A_I),
    .signal(Asignal), .count(a_count), .state(a_state)
  );

  txuart #(.BAUD_DIV(BAUD_DIV), .FIFO_DEPTH(FIFO_DEPTH), .SIG_W(32)) inst3 (
    .clk(CLK_10M), .rst_n, .readpulse(CLK_OUT),
    .endataA(Asignal), .endataE(Esignal),
    .txt(FPGA_PSD_TX3), .busy(tx_busy), .dropped(tx_dropped)
  );

  assign FPGA_T_EN2_N = 1'b0;
  assign FPGA_T_EN2   = 1'b1;

endmodule
