// txuart: asynchronous serial output of the two latched angle words.
//
// Once per period of the 1 kHz synchronisation clock (readpulse) the two
// 32-bit position words, endataA (azimuth) then endataE (elevation), are
// captured as one 64-bit sample into a small FIFO. The sample is taken on
// the falling edge of readpulse, half a period after the encoder channels
// latched their counts on its rising edge, so the words are settled. A
// serialiser pops one sample at a time and sends it as eight bytes, most
// significant byte of endataA first. Each byte is a frame of one start bit
// (0), eight data bits least significant first, one parity bit and one
// stop bit (1); the line idles at 1.
//
// The serialiser is a one-hot state machine with the states and codes of
// the original transmitter: idle 000001, start 000010, transdata 000100,
// stop 001000, parity 010000, quit 100000. start, transdata, parity and
// stop each last one bit time of BAUD_DIV clocks per bit; quit lasts one
// clock and either starts the next byte or returns to idle.
//
// Following the original design: the ports (10 MHz clock, readpulse,
// endataA, endataE, txt), the six states and their codes, the presence of
// a parity bit and of a FIFO buffer. Its own choices: the baud rate
// (10 MHz / 87, about 115200 baud), even parity, the byte order, the
// frame layout, the FIFO depth and the capture on the falling edge.
//
// Timing: one sample takes 8 * (11 * BAUD_DIV + 1) + 1 clocks
// (7665 clocks at the defaults), well inside the 10000-clock period of
// readpulse, so the FIFO normally holds at most one sample. txt is
// registered and lags the state by one clock.
module txuart #(
  parameter int unsigned BAUD_DIV   = 87,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter bit          ODD_PARITY = 1'b0,
  parameter int unsigned SIG_W      = encoder_pkg::SIG_W
) (
  input  logic             clk,        // 10 MHz system clock
  input  logic             rst_n,      // synchronous, active low
  input  logic             readpulse,  // 1 kHz synchronisation clock
  input  logic [SIG_W-1:0] endataA,    // azimuth word
  input  logic [SIG_W-1:0] endataE,    // elevation word
  output logic             txt,        // serial line, idles high
  output logic             busy,       // a sample is being sent
  output logic             dropped     // a sample was lost (FIFO full)
);
  import encoder_pkg::*;

  localparam int unsigned NBYTES = 2 * SIG_W / 8;
  localparam int unsigned BW     = $clog2(BAUD_DIV);
  localparam int unsigned IW     = $clog2(NBYTES);

  tx_state_t          state;
  logic               rp_q;
  logic               capture;
  logic [2*SIG_W-1:0] fifo_out;
  logic               fifo_empty, fifo_full, fifo_pop;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_level;

  logic [2*SIG_W-1:0] word;       // sample being sent, current byte on top
  logic [7:0]         shreg;      // bits of the current byte still to send
  logic [IW-1:0]      byte_idx;
  logic [2:0]         bit_idx;
  logic [BW-1:0]      baud_cnt;
  logic               parity;
  logic               bit_end;
  logic               line_d;

  // Capture one sample per readpulse period, on its falling edge.
  always_ff @(posedge clk) begin
    if (!rst_n) rp_q <= 1'b0;
    else        rp_q <= readpulse;
  end
  assign capture = rp_q && !readpulse;

  sync_fifo #(.WIDTH(2 * SIG_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(capture), .wr_data({endataA, endataE}),
    .pop(fifo_pop), .rd_data(fifo_out),
    .empty(fifo_empty), .full(fifo_full), .overflow(dropped),
    .level(fifo_level)
  );

  assign fifo_pop = (state == TX_IDLE) && !fifo_empty;
  assign bit_end  = (baud_cnt == BW'(BAUD_DIV - 1));
  assign busy     = (state != TX_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= TX_IDLE;
      word     <= '0;
      shreg    <= '0;
      byte_idx <= '0;
      bit_idx  <= '0;
      baud_cnt <= '0;
      parity   <= 1'b0;
    end else begin
      baud_cnt <= (state == TX_IDLE || state == TX_QUIT || bit_end) ? '0 : baud_cnt + 1'b1;
      unique case (state)
        TX_IDLE: begin
          if (!fifo_empty) begin
            word     <= fifo_out;
            byte_idx <= '0;
            state    <= TX_START;
          end
        end
        TX_START: begin
          if (bit_end) begin
            shreg   <= word[2*SIG_W-1 -: 8];
            parity  <= ODD_PARITY;
            bit_idx <= '0;
            state   <= TX_TRANSDATA;
          end
        end
        TX_TRANSDATA: begin
          if (bit_end) begin
            parity  <= parity ^ shreg[0];
            shreg   <= shreg >> 1;
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= TX_PARITY;
          end
        end
        TX_PARITY: if (bit_end) state <= TX_STOP;
        TX_STOP:   if (bit_end) state <= TX_QUIT;
        TX_QUIT: begin
          word <= word << 8;
          if (byte_idx == IW'(NBYTES - 1)) begin
            state <= TX_IDLE;
          end else begin
            byte_idx <= byte_idx + 1'b1;
            state    <= TX_START;
          end
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      TX_START:     line_d = 1'b0;
      TX_TRANSDATA: line_d = shreg[0];
      TX_PARITY:    line_d = parity;
      default:      line_d = 1'b1;   // idle, stop, quit
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) txt <= 1'b1;
    else        txt <= line_d;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(state));

  initial assert ((2 * SIG_W) % 8 == 0 && BAUD_DIV >= 2)
    else $error("txuart: words must be whole bytes and BAUD_DIV >= 2");

endmodule
