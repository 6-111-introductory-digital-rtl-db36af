// Walk request register: a set/reset flip-flop that remembers a pedestrian
// button press (wr_sync, already synchronized) until the controller serves
// it. The controller holds wr_reset high for the whole walk service; clear
// has priority over set, so presses during the walk are ignored.
// Interface: wr is registered, one cycle after the press or the clear.
// The set/clear behaviour follows the controller description; the clear
// priority is how this design implements "ignored during the walk".
module walk_register (
  input  logic clk,
  input  logic rst,       // synchronous, active high
  input  logic wr_sync,
  input  logic wr_reset,
  output logic wr
);

  always_ff @(posedge clk) begin
    if (rst || wr_reset) wr <= 1'b0;
    else if (wr_sync)    wr <= 1'b1;
  end

endmodule
