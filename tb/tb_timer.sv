// Self-checking test of the interval timer: after a start with value N,
// expired must rise on the cycle after the N-th tick and not before, must
// stay low during the start cycle, and a value of 0 must expire at once.
module tb_timer;
  logic clk = 0, rst, start, tick;
  logic [3:0] value;
  logic expired;
  int checks = 0, failures = 0;

  timer dut (.clk(clk), .rst(rst), .start_timer(start), .tick(tick), .value(value), .expired(expired));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (expired !== exp) begin
      failures++;
      $display("%s: expired=%b expected %b", what, expired, exp);
    end
  endtask

  // Start with value n, give ticks every gap cycles, count ticks to expiry.
  task automatic run(input int n, input int gap);
    int ticks;
    @(negedge clk);
    start = 1; value = 4'(n);
    #1 check(0, "start cycle");
    @(negedge clk);
    start = 0; value = 4'($urandom);
    #1;
    ticks = 0;
    while (!expired && ticks < 20) begin
      repeat (gap - 1) @(negedge clk);
      tick = 1;
      @(negedge clk);
      tick = 0;
      ticks++;
    end
    checks++;
    if (ticks != n) begin
      failures++;
      $display("value %0d expired after %0d ticks", n, ticks);
    end
    repeat (3) @(negedge clk);
    check(1, "stays expired");
  endtask

  initial begin
    rst = 1; start = 0; tick = 0; value = 0;
    @(negedge clk);
    rst = 0;
    for (int n = 0; n < 16; n++) run(n, 1 + $urandom_range(0, 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
