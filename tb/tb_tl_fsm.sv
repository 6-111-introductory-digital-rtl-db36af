// Self-checking test of the traffic light FSM. The testbench plays the
// timer: it raises expired a few cycles after every start_timer pulse and
// records, for every state the FSM enters, the lamps shown and the time
// parameter requested. Each scenario (plain cycle, side street car at the
// end of main green / side green, walk request, reprogram) is compared
// with the lamp sequence worked out by hand from the intersection rules.
module tb_tl_fsm;
  import tl_pkg::*;
  logic clk = 0, rst, sensor, wr, prog, expired, wr_reset, start_timer;
  interval_t interval;
  lights_t lights;
  int checks = 0, failures = 0;
  int wait_cnt;

  tl_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Timer stand-in: expired 4 cycles after the start pulse.
  always_ff @(posedge clk) begin
    if (start_timer) wait_cnt <= 4;
    else if (wait_cnt > 0) wait_cnt <= wait_cnt - 1;
  end
  assign expired = (wait_cnt == 0) && !start_timer;

  // Walk register stand-in: set by the test, cleared by wr_reset.
  always @(posedge clk) if (wr_reset) wr <= 1'b0;

  localparam lights_t MG = 7'b0011000;  // main green, side red
  localparam lights_t MY = 7'b0101000;  // main yellow, side red
  localparam lights_t WK = 7'b1001001;  // all red, walk
  localparam lights_t SG = 7'b1000010;  // side green, main red
  localparam lights_t SY = 7'b1000100;  // side yellow, main red

  // Wait for the next start pulse and check the state it belongs to.
  task automatic expect_state(input lights_t l, input interval_t iv, input string what);
    do @(posedge clk); while (!start_timer);
    #1;
    checks++;
    if (lights !== l || interval !== iv) begin
      failures++;
      $display("%s: lights=%b interval=%0d expected %b %0d", what, lights, interval, l, iv);
    end
    checks++;
    if (wr_reset !== (l == WK)) begin
      failures++;
      $display("%s: wr_reset=%b", what, wr_reset);
    end
  endtask

  initial begin
    rst = 1; sensor = 0; wr = 0; prog = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    // Plain cycle, started by reset.
    expect_state(MG, P_BASE, "main green 1");
    expect_state(MG, P_BASE, "main green 2");
    expect_state(MY, P_YEL,  "main yellow");
    expect_state(SG, P_BASE, "side green");
    expect_state(SY, P_YEL,  "side yellow");
    // Sensor high all cycle: main green extended by t_EXT, side by t_EXT.
    sensor = 1;
    expect_state(MG, P_BASE, "main green 1 (sensor)");
    expect_state(MG, P_EXT,  "main green ext");
    expect_state(MY, P_YEL,  "main yellow");
    expect_state(SG, P_BASE, "side green");
    expect_state(SG, P_EXT,  "side green ext");
    expect_state(SY, P_YEL,  "side yellow");
    sensor = 0;
    // Walk request: served after main yellow, then side green.
    wr = 1;
    expect_state(MG, P_BASE, "main green 1 (walk)");
    expect_state(MG, P_BASE, "main green 2");
    expect_state(MY, P_YEL,  "main yellow");
    expect_state(WK, P_EXT,  "walk");
    checks++;
    @(negedge clk);
    if (wr !== 0) begin failures++; $display("walk register not cleared"); end
    expect_state(SG, P_BASE, "side green after walk");
    expect_state(SY, P_YEL,  "side yellow");
    expect_state(MG, P_BASE, "main green 1 (no walk)");
    expect_state(MG, P_BASE, "main green 2");
    expect_state(MY, P_YEL,  "main yellow");
    expect_state(SG, P_BASE, "side green (walk served once)");
    // Reprogram during side green restarts the cycle at main green.
    @(negedge clk);
    prog = 1;
    @(negedge clk);
    prog = 0;
    expect_state(MG, P_BASE, "main green after reprogram");
    expect_state(MG, P_BASE, "main green 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
