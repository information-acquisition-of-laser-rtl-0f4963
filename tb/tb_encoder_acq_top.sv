// tb_encoder_acq_top: end-to-end test of the acquisition system with every
// parameter at its default (10 MHz clock, 1 kHz latch, 10000-clock filter
// window, wrap at 15743999, about 115200 baud).
//
// Two encoder models turn independently: azimuth steps forward, receives a
// reference mark and then walks at random; elevation first steps back
// through zero (wrap to 15743999) and forward again (wrap to 0), then walks.
// Steps bounce and are followed by glitches shorter than the filter window.
// Checked: at every 1 kHz latch both latched words equal the model
// positions (latches that fall within a few clocks of a count change are
// skipped); every sample received from the serial line equals the words
// latched one period before, with good parity and stop bits; the
// transceiver enables sit at their fixed levels. Each mechanism (count up,
// count down, both wraps, bounce, glitch, reference zero, latch, FIFO
// buffering, serial sample) must occur at least once.
module tb_encoder_acq_top;
  localparam int unsigned CNT_ALL = 15_743_999;
  localparam int unsigned STABLE  = 10_000;
  localparam int unsigned DELAY   = STABLE + 4;

  logic CLK_10M = 1'b0, rst_n = 1'b0;
  logic e_a, e_b, e_i, a_a, a_b, a_i;
  logic tx, en_n, en, clk_out, busy, dropped;
  logic [31:0] Asignal, Esignal;
  int   checks = 0, failures = 0;

  encoder_acq_top dut (
    .CLK_10M, .rst_n,
    .FPGA_E_A(e_a), .FPGA_E_B(e_b), .FPGA_E_I(e_i),
    .FPGA_A_A(a_a), .FPGA_A_B(a_b), .FPGA_A_I(a_i),
    .FPGA_PSD_TX3(tx), .FPGA_T_EN2_N(en_n), .FPGA_T_EN2(en),
    .Asignal, .Esignal, .CLK_OUT(clk_out), .tx_busy(busy), .tx_dropped(dropped));

  encoder_model #(.CNT_ALL(CNT_ALL), .GLITCH_MAX(STABLE / 2), .DELAY(DELAY))
    enc_e (.clk(CLK_10M), .a(e_a), .b(e_b), .z(e_i));
  encoder_model #(.CNT_ALL(CNT_ALL), .GLITCH_MAX(STABLE / 2), .DELAY(DELAY))
    enc_a (.clk(CLK_10M), .a(a_a), .b(a_b), .z(a_i));

  logic v, pe, fe;
  logic [7:0] d;
  longint st;
  uart_rx_model #(.BAUD_DIV(87)) rx (.clk(CLK_10M), .rx(tx), .valid(v), .data(d),
                                     .parity_err(pe), .frame_err(fe), .start_cycle(st));

  always #50 CLK_10M = ~CLK_10M;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge CLK_10M);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge CLK_10M) cyc <= cyc + 1;

  // latch monitor
  logic   co_q = 1'b0, latch_pending = 1'b0;
  longint latch_t;
  logic [63:0] latched[$];
  int     n_latch = 0, n_latch_checked = 0, n_fifo_used = 0, n_drop = 0;
  always @(posedge CLK_10M) if (rst_n) begin
    if (latch_pending) begin
      latched.push_back({Asignal, Esignal});
      n_latch++;
      if (!enc_a.near_change(latch_t, 4) && !enc_e.near_change(latch_t, 4)) begin
        n_latch_checked++;
        check(Asignal == 32'(enc_a.pos_at(latch_t)),
              $sformatf("Asignal %0d expected %0d", Asignal, enc_a.pos_at(latch_t)));
        check(Esignal == 32'(enc_e.pos_at(latch_t)),
              $sformatf("Esignal %0d expected %0d", Esignal, enc_e.pos_at(latch_t)));
      end
    end
    latch_pending <= clk_out && !co_q;
    latch_t       <= cyc;
    co_q          <= clk_out;
    if (!dut.inst3.fifo_empty) n_fifo_used++;
    if (dropped) n_drop++;
    check(en_n == 1'b0 && en == 1'b1, "transceiver enables");
  end

  // serial samples
  int nbytes = 0, nsamp = 0;
  logic [63:0] acc;
  always @(posedge CLK_10M) if (v) begin
    check(!pe && !fe, "parity/stop bit");
    acc = {acc[55:0], d};
    nbytes++;
    if (nbytes == 8) begin
      check(nsamp < latched.size() && acc == latched[nsamp],
            $sformatf("serial sample %0d = %h", nsamp, acc));
      nsamp++;
      nbytes = 0;
    end
  end

  function automatic int hold_time();
    return DELAY + 100 + int'($urandom % 4000);
  endfunction

  initial begin
    repeat (5) @(posedge CLK_10M);
    rst_n <= 1'b1;
    repeat (20) @(posedge CLK_10M);
    fork
      begin : azimuth
        for (int i = 0; i < 12; i++)
          enc_a.step(+1, hold_time(), ($urandom % 3) == 0, ($urandom % 3) == 0);
        enc_a.ref_mark(hold_time());
        for (int i = 0; i < 20; i++)
          enc_a.step((($urandom % 3) == 0) ? -1 : +1, hold_time(),
                     ($urandom % 3) == 0, ($urandom % 3) == 0);
      end
      begin : elevation
        enc_e.step(-1, hold_time(), 1'b1, 1'b0);
        enc_e.step(-1, hold_time(), 1'b0, 1'b1);
        enc_e.step(+1, hold_time(), 1'b0, 1'b0);
        enc_e.step(+1, hold_time(), 1'b1, 1'b1);
        for (int i = 0; i < 25; i++)
          enc_e.step((($urandom % 2) == 0) ? -1 : +1, hold_time(),
                     ($urandom % 3) == 0, ($urandom % 3) == 0);
      end
    join
    repeat (25_000) @(posedge CLK_10M);
    check(Asignal == 32'(enc_a.pos) && Esignal == 32'(enc_e.pos), "final positions");
    check(enc_a.n_up > 0 && enc_a.n_dn + enc_e.n_dn > 0, "counted up and down");
    check(enc_e.n_wrap_lo > 0, "wrap below zero");
    check(enc_e.n_wrap_hi > 0, "wrap above maximum");
    check(enc_a.n_bounce + enc_e.n_bounce > 0, "bounce filtered");
    check(enc_a.n_glitch + enc_e.n_glitch > 0, "glitch filtered");
    check(enc_a.n_zero > 0, "reference zero");
    check(n_latch_checked > 20, $sformatf("%0d latches checked", n_latch_checked));
    check(nsamp + 2 >= n_latch && nsamp > 20, $sformatf("%0d serial samples", nsamp));
    check(n_fifo_used > 0, "FIFO buffered a sample");
    check(n_drop == 0, "no sample dropped at the default rate");
    $display("latches=%0d checked=%0d samples=%0d A(up=%0d dn=%0d bounce=%0d glitch=%0d zero=%0d) E(up=%0d dn=%0d wrap_lo=%0d wrap_hi=%0d)",
             n_latch, n_latch_checked, nsamp, enc_a.n_up, enc_a.n_dn, enc_a.n_bounce,
             enc_a.n_glitch, enc_a.n_zero, enc_e.n_up, enc_e.n_dn, enc_e.n_wrap_lo, enc_e.n_wrap_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
