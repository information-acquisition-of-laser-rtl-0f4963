// uart_rx_model: behavioural serial receiver used by the testbenches.
// Waits for a falling edge on rx, samples each bit in the middle of its
// bit time (BAUD_DIV clocks per bit), checks the parity bit (even unless
// ODD_PARITY) and the stop bit, and reports each received byte with a
// one-clock strobe. start_cycle gives the clock count, since the model
// started, at which the start bit of the last byte began.
module uart_rx_model #(
  parameter int unsigned BAUD_DIV   = 87,
  parameter bit          ODD_PARITY = 1'b0
) (
  input  logic       clk,
  input  logic       rx,
  output logic       valid,
  output logic [7:0] data,
  output logic       parity_err,
  output logic       frame_err,
  output longint     start_cycle
);
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    valid = 1'b0; data = '0; parity_err = 1'b0; frame_err = 1'b0;
    start_cycle = 0;
    forever begin
      logic p;
      @(negedge rx);
      start_cycle = cyc;
      repeat (BAUD_DIV / 2) @(posedge clk);
      // middle of the start bit
      frame_err = (rx != 1'b0);
      p = ODD_PARITY;
      for (int i = 0; i < 8; i++) begin
        repeat (BAUD_DIV) @(posedge clk);
        data[i] = rx;
        p ^= rx;
      end
      repeat (BAUD_DIV) @(posedge clk);
      parity_err = (rx != p);
      repeat (BAUD_DIV) @(posedge clk);
      frame_err = frame_err || (rx != 1'b1);
      valid = 1'b1;
      @(posedge clk);
      valid = 1'b0;
    end
  end
endmodule
