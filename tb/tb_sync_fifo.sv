// tb_sync_fifo: random pushes and pops against a queue model. Checks the
// read data, empty, full, level and overflow every clock, and that a push
// into a full buffer is refused unless a pop happens in the same clock.
module tb_sync_fifo;
  localparam int unsigned W = 16, D = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0, pop = 1'b0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full, overflow;
  logic [$clog2(D+1)-1:0] level;
  int   checks = 0, failures = 0, n_over = 0, n_full = 0;
  logic [W-1:0] q[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .push, .wr_data, .pop,
                                         .rd_data, .empty, .full, .overflow, .level);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_over;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    for (int i = 0; i < 5000; i++) begin
      // bias toward filling in the first half, emptying in the second
      push    = ($urandom % 100) < ((i % 400) < 200 ? 70 : 30);
      pop     = ($urandom % 100) < ((i % 400) < 200 ? 30 : 70);
      wr_data = W'($urandom);
      #1;
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == D), "full");
      check(level == q.size(), $sformatf("level %0d vs %0d", level, q.size()));
      if (q.size() > 0) check(rd_data == q[0], "read data");
      exp_over = push && q.size() == D && !pop;
      check(overflow == exp_over, "overflow");
      if (full) n_full++;
      if (overflow) n_over++;
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && !exp_over) q.push_back(wr_data);
      #1;
    end
    check(n_full > 0 && n_over > 0, "full and overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
