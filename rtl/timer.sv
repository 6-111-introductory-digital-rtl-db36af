// Interval timer of the traffic light controller. A one-cycle start_timer
// loads the 4-bit time parameter value (seconds); each 1 Hz tick then
// counts it down, and expired is high while the count is zero and no load
// is in progress. Because the divider runs freely, an interval of N
// seconds lasts between N-1 and N seconds; a value of 0 expires on the
// cycle after the load.
// The start_timer / 1 Hz enable / value / expired interface is the one of
// the controller's block diagram; the down counter is this design's choice.
module timer (
  input  logic       clk,
  input  logic       rst,
  input  logic       start_timer,
  input  logic       tick,
  input  logic [3:0] value,
  output logic       expired
);

  logic [3:0] count;

  always_ff @(posedge clk) begin
    if (rst)                      count <= '0;
    else if (start_timer)         count <= value;
    else if (tick && count != 0)  count <= count - 1'b1;
  end

  assign expired = (count == 0) && !start_timer;

endmodule
