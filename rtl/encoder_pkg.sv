// encoder_pkg: types and constants shared by the incremental-encoder
// acquisition design.
//
// The quadrature decoder state encoding follows the five states named for
// the design (IDLE, ALBL, AHBL, AHBH, ALBH, also called S0..S4); the binary
// code of each state is this design's choice. The serial transmitter states
// carry the one-hot codes listed for the transmitter (idle 000001 ...
// quit 100000). CLK_HZ, SYNC_HZ and CNT_ALL are the system clock, the
// synchronisation rate and the counter wrap value of the original design.
package encoder_pkg;

  // System clock and 1 kHz synchronisation clock.
  localparam int unsigned CLK_HZ  = 10_000_000;
  localparam int unsigned SYNC_HZ = 1_000;

  // Largest count value; the position counter runs 0..CNT_ALL and wraps.
  localparam int unsigned CNT_ALL = 15_743_999;

  // Width of the angle words sent to the host.
  localparam int unsigned SIG_W = 32;

  // Quadrature decoder states. The suffix names the levels of A and B
  // (L = low, H = high); S1..S4 correspond to AB = 00, 10, 11, 01.
  typedef enum logic [2:0] {
    QS_IDLE = 3'd0,   // S0: initial state, counter initialisation
    QS_ALBL = 3'd1,   // S1: A=0 B=0
    QS_AHBL = 3'd2,   // S2: A=1 B=0
    QS_AHBH = 3'd3,   // S3: A=1 B=1
    QS_ALBH = 3'd4    // S4: A=0 B=1
  } quad_state_t;

  // De-glitch filter states.
  typedef enum logic {
    KF_IDLE  = 1'b0,  // input agrees with the filtered output
    KF_COUNT = 1'b1   // input differs: timing how long it stays stable
  } filt_state_t;

  // Serial transmitter states, one-hot.
  typedef enum logic [5:0] {
    TX_IDLE      = 6'b000001,
    TX_START     = 6'b000010,
    TX_TRANSDATA = 6'b000100,
    TX_STOP      = 6'b001000,
    TX_PARITY    = 6'b010000,
    TX_QUIT      = 6'b100000
  } tx_state_t;

  // Level pair of the two phases, A in bit 1, B in bit 0.
  function automatic quad_state_t ab_to_state(input logic a, input logic b);
    unique case ({a, b})
      2'b00:   return QS_ALBL;
      2'b10:   return QS_AHBL;
      2'b11:   return QS_AHBH;
      default: return QS_ALBH;
    endcase
  endfunction

endpackage
