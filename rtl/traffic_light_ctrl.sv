// Traffic light controller for a main street / side street intersection
// with a pedestrian walk lamp. Reset, Sensor, Walk Request and Reprogram
// pass through a synchronizer; the synchronized walk request sets the walk
// register; the FSM addresses the time parameter memory, starts the timer
// and advances when the timer, paced by the 1 Hz enable of the divider,
// expires. The time parameters (t_BASE 6 s, t_EXT 3 s, t_YEL 2 s after
// reset) can be rewritten at any time with time_param_sel, time_value and
// reprogram.
// Inputs are asynchronous (buttons, switches, sensor); lights is a
// combinational decode of the FSM state register. Every input change is
// seen two clocks later. The block partition and the signal names follow
// the controller's block diagram; CLK_HZ is an assumed clock frequency.
module traffic_light_ctrl
  import tl_pkg::*;
#(
  parameter int unsigned CLK_HZ = 1_843_200
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       sensor,
  input  logic       walk_request,
  input  logic       reprogram,
  input  logic [1:0] time_param_sel,
  input  logic [3:0] time_value,
  output lights_t    lights
);

  logic      reset_sync, sensor_sync, wr_sync, prog_sync;
  logic      wr, wr_reset, start_timer, expired, tick;
  interval_t interval;
  logic [3:0] value;

  synchronizer #(.WIDTH(4)) u_sync (
    .clk (clk),
    .d   ({reset, sensor, walk_request, reprogram}),
    .q   ({reset_sync, sensor_sync, wr_sync, prog_sync})
  );

  walk_register u_walk (
    .clk      (clk),
    .rst      (reset_sync),
    .wr_sync  (wr_sync),
    .wr_reset (wr_reset),
    .wr       (wr)
  );

  time_parameters u_params (
    .clk        (clk),
    .rst        (reset_sync),
    .prog       (prog_sync),
    .sel        (time_param_sel),
    .time_value (time_value),
    .interval   (interval),
    .value      (value)
  );

  divider #(.CLK_HZ(CLK_HZ)) u_div (
    .clk  (clk),
    .rst  (reset_sync),
    .tick (tick)
  );

  timer u_timer (
    .clk         (clk),
    .rst         (reset_sync),
    .start_timer (start_timer),
    .tick        (tick),
    .value       (value),
    .expired     (expired)
  );

  tl_fsm u_fsm (
    .clk         (clk),
    .rst         (reset_sync),
    .sensor      (sensor_sync),
    .wr          (wr),
    .prog        (prog_sync),
    .expired     (expired),
    .wr_reset    (wr_reset),
    .interval    (interval),
    .start_timer (start_timer),
    .lights      (lights)
  );

endmodule
