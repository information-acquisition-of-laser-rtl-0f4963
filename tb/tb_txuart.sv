// tb_txuart: checks the serial transmitter. The testbench makes its own
// 1 kHz readpulse (10000 clocks, half high) and new random angle words at
// every rising edge. Instance u_fast runs at the defaults: every sample
// taken at a falling edge of readpulse must arrive as eight frames (endataA
// most significant byte first, then endataE) with correct parity and stop
// bits, the first start bit within a few clocks of the capture, bytes
// exactly 11 * BAUD_DIV + 1 clocks apart, and the whole sample finished
// before the next capture. Instance u_slow is deliberately too slow
// (BAUD_DIV 300) with a two-entry FIFO: samples must be dropped, and those
// that arrive must be an in-order subsequence of the captured ones.
module tb_txuart;
  localparam int unsigned PERIOD = 10000;
  localparam int unsigned BD     = 87;
  localparam int unsigned BD_S   = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic readpulse = 1'b0;
  logic [31:0] endataA = '0, endataE = '0;
  logic txt_f, busy_f, drop_f, txt_s, busy_s, drop_s;
  int   checks = 0, failures = 0;

  txuart u_fast (.clk, .rst_n, .readpulse, .endataA, .endataE,
                 .txt(txt_f), .busy(busy_f), .dropped(drop_f));
  txuart #(.BAUD_DIV(BD_S), .FIFO_DEPTH(2)) u_slow (
    .clk, .rst_n, .readpulse, .endataA, .endataE,
    .txt(txt_s), .busy(busy_s), .dropped(drop_s));

  logic v_f, pe_f, fe_f, v_s, pe_s, fe_s;
  logic [7:0] d_f, d_s;
  longint st_f, st_s;
  uart_rx_model #(.BAUD_DIV(BD))   rx_f (.clk, .rx(txt_f), .valid(v_f), .data(d_f),
                                         .parity_err(pe_f), .frame_err(fe_f), .start_cycle(st_f));
  uart_rx_model #(.BAUD_DIV(BD_S)) rx_s (.clk, .rx(txt_s), .valid(v_s), .data(d_s),
                                         .parity_err(pe_s), .frame_err(fe_s), .start_cycle(st_s));

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // stimulus: readpulse and data
  logic [63:0] captured[$];
  longint      capture_cyc[$];
  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    forever begin
      repeat (PERIOD / 2) @(posedge clk);
      readpulse <= 1'b1;
      endataA   <= $urandom;
      endataE   <= $urandom;
      repeat (PERIOD / 2) @(posedge clk);
      readpulse <= 1'b0;
      captured.push_back({endataA, endataE});
      capture_cyc.push_back(cyc);
    end
  end

  // fast receiver: assemble samples
  int nbytes_f = 0, nsamp_f = 0;
  logic [63:0] acc_f;
  longint first_st, prev_st;
  always @(posedge clk) if (v_f) begin
    check(!pe_f && !fe_f, "fast: parity/stop bit");
    if (nbytes_f == 0) begin
      first_st = st_f;
      check(st_f - capture_cyc[nsamp_f] <= 5 && st_f > capture_cyc[nsamp_f],
            $sformatf("fast: start latency %0d", st_f - capture_cyc[nsamp_f]));
    end else begin
      check(st_f - prev_st == 11 * BD + 1, $sformatf("fast: byte spacing %0d", st_f - prev_st));
    end
    prev_st  = st_f;
    acc_f    = {acc_f[55:0], d_f};
    nbytes_f++;
    if (nbytes_f == 8) begin
      check(acc_f == captured[nsamp_f],
            $sformatf("fast: sample %0d %h vs %h", nsamp_f, acc_f, captured[nsamp_f]));
      check(cyc - capture_cyc[nsamp_f] < PERIOD, "fast: sample done within one period");
      nsamp_f++;
      nbytes_f = 0;
    end
  end

  // slow receiver: received samples must be an in-order subsequence
  int nbytes_s = 0, nsamp_s = 0, search = 0, ndrop = 0;
  logic [63:0] acc_s;
  always @(posedge clk) begin
    if (drop_s) ndrop++;
    check(!drop_f, "fast: never drops");
    if (v_s) begin
      check(!pe_s && !fe_s, "slow: parity/stop bit");
      acc_s = {acc_s[55:0], d_s};
      nbytes_s++;
      if (nbytes_s == 8) begin
        while (search < captured.size() && captured[search] != acc_s) search++;
        check(search < captured.size(), $sformatf("slow: sample %h not captured", acc_s));
        search++;
        nsamp_s++;
        nbytes_s = 0;
      end
    end
  end

  initial begin
    wait (nsamp_f == 12);
    check(nsamp_s >= 4, $sformatf("slow: %0d samples received", nsamp_s));
    check(ndrop > 0, $sformatf("slow: %0d samples dropped", ndrop));
    check(ndrop + nsamp_s + 3 >= captured.size(), "slow: samples accounted for");
    $display("fast=%0d slow=%0d dropped=%0d captured=%0d", nsamp_f, nsamp_s, ndrop, captured.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
