// tb_fig_capture: reproduces a capture of the running system near the wrap
// point, with every parameter at its default. After reset both counts are 0.
// The azimuth encoder steps back three counts (running count 15743997),
// forward one (15743998) and back one (15743997); the elevation encoder
// steps back one (15743999). Checked: the sequence of running azimuth
// counts, the latched words Asignal = 15743997 and Esignal = 15743999 once
// motion has stopped, and the same two words on the serial line, with good
// parity and stop bits.
module tb_fig_capture;
  localparam longint A_EXP = 15_743_997;
  localparam longint E_EXP = 15_743_999;

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

  encoder_model enc_e (.clk(CLK_10M), .a(e_a), .b(e_b), .z(e_i));
  encoder_model enc_a (.clk(CLK_10M), .a(a_a), .b(a_b), .z(a_i));

  logic v, pe, fe;
  logic [7:0] d;
  longint st;
  uart_rx_model rx (.clk(CLK_10M), .rx(tx), .valid(v), .data(d),
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
    repeat (400_000) @(posedge CLK_10M);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record every change of the running azimuth count
  longint a_seq[$];
  logic [31:0] a_prev = '0;
  always @(posedge CLK_10M) if (rst_n) begin
    if (dut.a_count != a_prev) a_seq.push_back(longint'(dut.a_count));
    a_prev <= dut.a_count;
  end

  // serial samples
  int nbytes = 0;
  logic [63:0] acc, last_sample = '0;
  always @(posedge CLK_10M) if (v) begin
    check(!pe && !fe, "parity/stop bit");
    acc = {acc[55:0], d};
    nbytes++;
    if (nbytes == 8) begin
      last_sample = acc;
      nbytes = 0;
    end
  end

  initial begin
    repeat (5) @(posedge CLK_10M);
    rst_n <= 1'b1;
    repeat (20) @(posedge CLK_10M);
    fork
      begin
        enc_a.step(-1, 11_000, 1'b0, 1'b0);
        enc_a.step(-1, 11_000, 1'b1, 1'b0);
        enc_a.step(-1, 11_000, 1'b0, 1'b0);
        enc_a.step(+1, 11_000, 1'b0, 1'b1);
        enc_a.step(-1, 11_000, 1'b0, 1'b0);
      end
      enc_e.step(-1, 11_000, 1'b0, 1'b0);
    join
    repeat (25_000) @(posedge CLK_10M);
    check(a_seq.size() == 5, $sformatf("%0d azimuth count changes", a_seq.size()));
    if (a_seq.size() == 5)
      check(a_seq[0] == 15_743_999 && a_seq[1] == 15_743_998 && a_seq[2] == A_EXP &&
            a_seq[3] == 15_743_998 && a_seq[4] == A_EXP, "azimuth count sequence");
    check(Asignal == 32'(A_EXP), $sformatf("Asignal %0d", Asignal));
    check(Esignal == 32'(E_EXP), $sformatf("Esignal %0d", Esignal));
    check(last_sample == {32'(A_EXP), 32'(E_EXP)}, $sformatf("serial sample %h", last_sample));
    check(dut.inst8.state != encoder_pkg::QS_IDLE, "decoder left IDLE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
