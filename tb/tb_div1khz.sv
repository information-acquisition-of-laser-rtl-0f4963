// tb_div1khz: checks the 1 kHz divider at its default ratio (10 MHz / 10000).
// Measures the clock count from reset release to the first rising edge,
// the period, the high time, and that tick fires exactly once per period,
// in the clock just before each rising edge.
module tb_div1khz;
  localparam int unsigned DIV = 10000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clk_1khz, tick;
  int   checks = 0, failures = 0;

  div1khz dut (.clk, .rst_n, .clk_1khz, .tick);

  always #50 clk = ~clk;   // 10 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc, last_rise, last_fall, rises, ticks, tick_before_rise;
  logic prev;

  initial begin
    cyc = 0; last_rise = -1; last_fall = -1; rises = 0; ticks = 0;
    tick_before_rise = 0;
    repeat (3) @(posedge clk);
    check(clk_1khz == 1'b0 && tick == 1'b0, "outputs low in reset");
    rst_n <= 1'b1;
    prev = 1'b0;
    forever begin
      @(posedge clk);
      #1;
      cyc++;
      if (tick) ticks++;
      if (clk_1khz && !prev) begin
        rises++;
        if (rises == 1)
          check(cyc == DIV / 2, $sformatf("first rise after %0d clocks", cyc));
        else
          check(cyc - last_rise == DIV, $sformatf("period %0d", cyc - last_rise));
        last_rise = cyc;
      end
      if (!clk_1khz && prev && last_rise >= 0)
        check(cyc - last_rise == DIV / 2, $sformatf("high time %0d", cyc - last_rise));
      // tick must be high exactly in the clock before each rise
      if (tick) check(!clk_1khz && dut.cnt == 14'(DIV / 2 - 1), "tick position");
      prev = clk_1khz;
      if (rises == 5) break;
    end
    check(ticks == 5, $sformatf("ticks %0d", ticks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
