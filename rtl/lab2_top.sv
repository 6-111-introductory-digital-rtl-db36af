// Top level of the two laboratory designs, which are unrelated and stand
// side by side with their own clocks, resets and pins:
//   tl_*  the traffic light controller (main street, side street and walk
//         lamps; walk button, side street sensor, time reprogramming),
//   mt_*  the memory tester for a 6264 SRAM (split data bus, hex display
//         values, write/read/fail/pass LEDs).
// CLK_HZ is the frequency of both clocks, used by the 1 Hz dividers; its
// default is an assumed value.
module lab2_top
  import tl_pkg::*;
  import mt_pkg::*;
#(
  parameter int unsigned CLK_HZ = 1_843_200
) (
  // traffic light controller
  input  logic          tl_clk,
  input  logic          tl_reset,
  input  logic          tl_sensor,
  input  logic          tl_walk_request,
  input  logic          tl_reprogram,
  input  logic [1:0]    tl_time_param_sel,
  input  logic [3:0]    tl_time_value,
  output lights_t       tl_lights,
  // memory tester
  input  logic          mt_clk,
  input  logic          mt_reset,
  output logic [AW-1:0] mt_sram_addr,
  output logic [DW-1:0] mt_sram_dout,
  output logic          mt_sram_doe,
  input  logic [DW-1:0] mt_sram_din,
  output logic          mt_sram_we_n,
  output logic          mt_sram_oe_n,
  output logic [AW-1:0] mt_disp_addr,
  output logic [DW-1:0] mt_disp_data,
  output logic          mt_led_write,
  output logic          mt_led_read,
  output logic          mt_led_fail,
  output logic          mt_led_pass
);

  traffic_light_ctrl #(.CLK_HZ(CLK_HZ)) u_traffic (
    .clk            (tl_clk),
    .reset          (tl_reset),
    .sensor         (tl_sensor),
    .walk_request   (tl_walk_request),
    .reprogram      (tl_reprogram),
    .time_param_sel (tl_time_param_sel),
    .time_value     (tl_time_value),
    .lights         (tl_lights)
  );

  mem_tester #(.CLK_HZ(CLK_HZ)) u_memtest (
    .clk       (mt_clk),
    .reset     (mt_reset),
    .sram_addr (mt_sram_addr),
    .sram_dout (mt_sram_dout),
    .sram_doe  (mt_sram_doe),
    .sram_din  (mt_sram_din),
    .sram_we_n (mt_sram_we_n),
    .sram_oe_n (mt_sram_oe_n),
    .disp_addr (mt_disp_addr),
    .disp_data (mt_disp_data),
    .led_write (mt_led_write),
    .led_read  (mt_led_read),
    .led_fail  (mt_led_fail),
    .led_pass  (mt_led_pass)
  );

endmodule
