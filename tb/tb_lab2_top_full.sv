// Full-size run of the top level with every parameter at its default
// (CLK_HZ = 1 843 200, so each second is 1 843 200 clock cycles). The
// traffic light controller goes through one complete cycle with a walk
// request (main yellow 2 s, walk 3 s, side green 6 s, side yellow 2 s,
// main green 12 s), while the memory tester runs its complete 64-second
// test on a good model SRAM and must end with the pass LED.
module tb_lab2_top_full;
  import tl_pkg::*;
  localparam int HZ = 1_843_200;
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
  logic [3:0] mt_sram_addr, mt_sram_dout, mt_sram_din, mt_disp_addr, mt_disp_data;
  logic mt_sram_doe, mt_sram_we_n, mt_sram_oe_n, mt_led_write, mt_led_read, mt_led_fail, mt_led_pass;
  int checks = 0, failures = 0;

  lab2_top dut (.*);
  sram_6264_model ram (.addr(mt_sram_addr), .dout(mt_sram_dout), .doe(mt_sram_doe), .din(mt_sram_din),
                       .we_n(mt_sram_we_n), .oe_n(mt_sram_oe_n), .open_d(4'b0000), .short_a1(1'b0));

  always #5 tl_clk = ~tl_clk;
  always #5 mt_clk = ~mt_clk;

  // Watchdog: 70 simulated seconds of the 10-unit clock.
  initial begin
    #(longint'(70) * HZ * 10);
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
      @(posedge tl_clk);
      cnt++;
    end
    check(cnt >= secs * HZ - 3 && cnt <= secs * HZ + 3,
          $sformatf("%s: lasted %0d cycles, expected %0d", what, cnt, secs * HZ));
  endtask

  task automatic traffic();
    tl_reset = 1; tl_sensor = 0; tl_walk_request = 0; tl_reprogram = 0;
    tl_time_param_sel = 0; tl_time_value = 0;
    repeat (4) @(posedge tl_clk);
    #3 tl_reset = 0;
    #100 tl_walk_request = 1;
    #100 tl_walk_request = 0;
    wait (tl_lights == MY);
    @(posedge tl_clk);
    phase(MY, 2, "main yellow");
    phase(WK, 3, "walk");
    phase(SG, 6, "side green");
    phase(SY, 2, "side yellow");
    phase(MG, 12, "main green");
    check(tl_lights == MY, "main yellow after main green");
  endtask

  task automatic memtest();
    longint cyc = 0;
    #3 mt_reset = 1;
    repeat (3) @(posedge mt_clk);
    #3 mt_reset = 0;
    while (!mt_led_fail && !mt_led_pass) begin
      @(posedge mt_clk);
      cyc++;
    end
    check(mt_led_pass && cyc >= 64 * HZ - 2 && cyc <= 64 * HZ + 6,
          $sformatf("memory test: pass=%b after %0d cycles", mt_led_pass, cyc));
    check(ram.wr_count >= 32, "fewer than 32 write strobes");
  endtask

  initial begin
    mt_reset = 1;
    fork
      traffic();
      memtest();
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
