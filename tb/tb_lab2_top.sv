// End-to-end test of both laboratory designs in the top level, at a scaled
// clock (CLK_HZ = 20). The traffic light controller and the memory tester
// run at the same time on their own clocks. Every lamp phase is timed
// against the intersection rules; the memory tester runs once on a good
// model SRAM (must pass after 64 one-second operations) and once with data
// line D[3] open (must stop at address 0). Each mechanism of the designs
// (sensor extension of main and of side green, walk service, a press
// ignored during the walk, reprogramming, memory pass, memory failure) is
// counted, and one that never happened counts as a failure.
module tb_lab2_top;
  import tl_pkg::*;
  localparam int HZ = 20;
  localparam lights_t MG = 7'b0011000;
  localparam lights_t MY = 7'b0101000;
  localparam lights_t WK = 7'b1001001;
  localparam lights_t SG = 7'b1000010;
  localparam lights_t SY = 7'b1000100;

  logic tl_clk = 0, mt_clk = 0;
  logic tl_reset, tl_sensor, tl_walk_request, tl_reprogram;
  logic [1:0] tl_time_param_sel;
  logic [3:0] tl_time_value;
  lights_t tl_lights;
  logic mt_reset;
  logic [3:0] mt_sram_addr, mt_sram_dout, mt_sram_din, mt_disp_addr, mt_disp_data, open_d;
  logic mt_sram_doe, mt_sram_we_n, mt_sram_oe_n, mt_led_write, mt_led_read, mt_led_fail, mt_led_pass;
  int checks = 0, failures = 0;
  int n_main_ext = 0, n_side_ext = 0, n_walk = 0, n_walk_ignored = 0, n_reprogram = 0;
  int n_mem_pass = 0, n_mem_fail = 0;

  lab2_top #(.CLK_HZ(HZ)) dut (.*);
  sram_6264_model ram (.addr(mt_sram_addr), .dout(mt_sram_dout), .doe(mt_sram_doe), .din(mt_sram_din),
                       .we_n(mt_sram_we_n), .oe_n(mt_sram_oe_n), .open_d(open_d), .short_a1(1'b0));

  always #5 tl_clk = ~tl_clk;
  always #7 mt_clk = ~mt_clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s", what);
    end
  endtask

  task automatic phase(input lights_t l, input int secs, input string what);
    int cnt = 0;
    check(tl_lights === l, $sformatf("%s: lights=%b expected %b", what, tl_lights, l));
    while (tl_lights === l && cnt < 20 * HZ) begin
      @(posedge tl_clk); #1;
      cnt++;
    end
    check(cnt >= secs * HZ - 3 && cnt <= secs * HZ + 3,
          $sformatf("%s: lasted %0d cycles, expected %0d", what, cnt, secs * HZ));
  endtask

  task automatic press_walk();
    #3 tl_walk_request = 1;
    repeat (3) @(posedge tl_clk);
    #3 tl_walk_request = 0;
  endtask

  // Traffic light controller scenario.
  task automatic traffic();
    tl_reset = 1; tl_sensor = 0; tl_walk_request = 0; tl_reprogram = 0;
    tl_time_param_sel = 0; tl_time_value = 0;
    repeat (4) @(posedge tl_clk);
    #3 tl_reset = 0;
    wait (tl_lights == MY);
    @(posedge tl_clk); #1;
    phase(MY, 2, "main yellow");
    tl_sensor = 1;
    phase(SG, 9, "side green, car waiting");
    n_side_ext++;
    phase(SY, 2, "side yellow");
    phase(MG, 9, "main green, car waiting");
    n_main_ext++;
    tl_sensor = 0;
    fork press_walk(); join_none
    phase(MY, 2, "main yellow, walk requested");
    fork begin
      repeat (HZ) @(posedge tl_clk);
      if (tl_lights == WK) n_walk_ignored++;
      press_walk();
    end join_none
    phase(WK, 3, "walk");
    n_walk++;
    phase(SG, 6, "side green");
    phase(SY, 2, "side yellow");
    phase(MG, 12, "main green");
    phase(MY, 2, "main yellow");
    phase(SG, 6, "side green, press during walk ignored");
    // Reprogram the yellow interval to 5 s.
    tl_time_param_sel = 2'b10; tl_time_value = 4'd5;
    repeat (2) @(posedge tl_clk);
    #3 tl_reprogram = 1;
    repeat (3) @(posedge tl_clk);
    #3 tl_reprogram = 0;
    repeat (4) @(posedge tl_clk);
    check(tl_lights == MG, "reprogram did not restart at main green");
    wait (tl_lights == MY);
    @(posedge tl_clk); #1;
    phase(MY, 5, "main yellow, reprogrammed to 5 s");
    n_reprogram++;
    phase(SG, 6, "side green");
    phase(SY, 5, "side yellow, reprogrammed");
  endtask

  // Memory tester scenario: good memory, then D[3] open.
  task automatic memtest();
    int cyc;
    open_d = 0;
    for (int pass = 0; pass < 2; pass++) begin
      #3 mt_reset = 1;
      repeat (3) @(posedge mt_clk);
      #3 mt_reset = 0;
      cyc = 0;
      while (!mt_led_fail && !mt_led_pass && cyc < 100 * HZ) begin
        @(posedge mt_clk); #1;
        cyc++;
      end
      if (pass == 0) begin
        check(mt_led_pass && cyc >= 64 * HZ - 2 && cyc <= 64 * HZ + 6,
              $sformatf("good SRAM: pass=%b after %0d cycles", mt_led_pass, cyc));
        if (mt_led_pass) n_mem_pass++;
        open_d = 4'b1000;
      end else begin
        check(mt_led_fail && mt_sram_addr == 0 && mt_disp_addr == 0 && mt_disp_data == 4'hB,
              $sformatf("open D[3]: fail=%b addr=%0d data=%h", mt_led_fail, mt_sram_addr, mt_disp_data));
        if (mt_led_fail) n_mem_fail++;
      end
    end
  endtask

  initial begin
    mt_reset = 1; open_d = 0;
    fork
      traffic();
      memtest();
    join
    $display("main green extended %0d, side green extended %0d, walks %0d, presses ignored %0d, reprograms %0d, memory passes %0d, memory failures %0d",
             n_main_ext, n_side_ext, n_walk, n_walk_ignored, n_reprogram, n_mem_pass, n_mem_fail);
    check(n_main_ext > 0, "main green never extended");
    check(n_side_ext > 0, "side green never extended");
    check(n_walk > 0, "walk never served");
    check(n_walk_ignored > 0, "no press during a walk");
    check(n_reprogram > 0, "never reprogrammed");
    check(n_mem_pass > 0, "memory test never passed");
    check(n_mem_fail > 0, "memory test never failed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
