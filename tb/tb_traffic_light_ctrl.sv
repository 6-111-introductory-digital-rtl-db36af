// Self-checking test of the whole traffic light controller at a scaled
// clock (CLK_HZ = 20, so one second is 20 cycles). Every lamp phase is
// timed and compared with the seconds the intersection rules give:
// plain cycle (12, 2, 6, 2 s), side street car present (main green
// 6 + 3 s, side green 6 + 3 s), walk request (3 s walk after main yellow,
// a press during the walk ignored), and reprogrammed times (t_BASE 4,
// t_EXT 5, t_YEL 1). Inputs are driven asynchronously to the clock.
module tb_traffic_light_ctrl;
  import tl_pkg::*;
  localparam int HZ = 20;
  localparam lights_t MG = 7'b0011000;
  localparam lights_t MY = 7'b0101000;
  localparam lights_t WK = 7'b1001001;
  localparam lights_t SG = 7'b1000010;
  localparam lights_t SY = 7'b1000100;

  logic clk = 0, reset, sensor, walk_request, reprogram;
  logic [1:0] time_param_sel;
  logic [3:0] time_value;
  lights_t lights;
  int checks = 0, failures = 0;

  traffic_light_ctrl #(.CLK_HZ(HZ)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Called in the first cycle of a phase: checks its lamps and that it
  // lasts secs seconds (to within a few clocks of pipeline delay).
  task automatic phase(input lights_t l, input int secs, input string what);
    int cnt = 0;
    checks++;
    if (lights !== l) begin
      failures++;
      $display("%s: lights=%b expected %b", what, lights, l);
    end
    while (lights === l && cnt < 20 * HZ) begin
      @(posedge clk); #1;
      cnt++;
    end
    checks++;
    if (cnt < secs * HZ - 3 || cnt > secs * HZ + 3) begin
      failures++;
      $display("%s: lasted %0d cycles, expected %0d", what, cnt, secs * HZ);
    end
  endtask

  task automatic press(ref logic b, input int cycles);
    #3 b = 1;
    repeat (cycles) @(posedge clk);
    #3 b = 0;
  endtask

  task automatic set_param(input logic [1:0] sel, input logic [3:0] val);
    time_param_sel = sel; time_value = val;
    repeat (2) @(posedge clk);
    press(reprogram, 3);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    reset = 1; sensor = 0; walk_request = 0; reprogram = 0; time_param_sel = 0; time_value = 0;
    repeat (4) @(posedge clk);
    #3 reset = 0;
    wait (lights == MY);
    @(posedge clk); #1;
    // Default times, no car, no walk.
    phase(MY, 2, "main yellow");
    phase(SG, 6, "side green");
    phase(SY, 2, "side yellow");
    phase(MG, 12, "main green");
    phase(MY, 2, "main yellow");
    phase(SG, 6, "side green");
    // Side street car present.
    sensor = 1;
    phase(SY, 2, "side yellow");
    phase(MG, 9, "main green, car waiting");
    phase(MY, 2, "main yellow");
    phase(SG, 9, "side green, extended");
    sensor = 0;
    phase(SY, 2, "side yellow");
    // Walk request during main green.
    fork press(walk_request, 3); join_none
    phase(MG, 12, "main green, walk requested");
    phase(MY, 2, "main yellow");
    fork begin repeat (HZ) @(posedge clk); press(walk_request, 3); end join_none
    phase(WK, 3, "walk");
    phase(SG, 6, "side green after walk");
    phase(SY, 2, "side yellow");
    phase(MG, 12, "main green");
    phase(MY, 2, "main yellow, press during walk ignored");
    phase(SG, 6, "side green");
    // Reprogram t_BASE = 4, t_YEL = 1, t_EXT = 5 during side yellow.
    set_param(2'b00, 4'd4);
    set_param(2'b10, 4'd1);
    set_param(2'b01, 4'd5);
    checks++;
    if (lights !== MG) begin failures++; $display("reprogram did not restart at main green"); end
    wait (lights == MY);
    @(posedge clk); #1;
    phase(MY, 1, "main yellow, reprogrammed");
    phase(SG, 4, "side green, reprogrammed");
    sensor = 1;
    phase(SY, 1, "side yellow, reprogrammed");
    phase(MG, 9, "main green 4 + 5, car waiting");
    phase(MY, 1, "main yellow");
    phase(SG, 9, "side green 4 + 5");
    sensor = 0;
    phase(SY, 1, "side yellow");
    phase(MG, 8, "main green 2 x 4");
    // Reset brings the default times back.
    #3 reset = 1;
    repeat (3) @(posedge clk);
    #3 reset = 0;
    wait (lights == MY);
    @(posedge clk); #1;
    phase(MY, 2, "main yellow after reset");
    phase(SG, 6, "side green after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
