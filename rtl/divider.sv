// Clock divider: counts CLK_HZ clock cycles and raises tick for one cycle
// at the end of each count, giving a 1 Hz enable for the timers of both
// lab designs. The first tick comes CLK_HZ cycles after reset.
// The one-cycle-per-second pulse follows the lab description; the clock
// frequency is not given there, so CLK_HZ is a parameter with an assumed
// default, and the synchronous reset is this design's addition.
module divider #(
  parameter int unsigned CLK_HZ = 1_843_200
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned CW = (CLK_HZ > 1) ? $clog2(CLK_HZ) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (count == CW'(CLK_HZ - 1)) begin
      count <= '0;
      tick  <= 1'b1;
    end else begin
      count <= count + 1'b1;
      tick  <= 1'b0;
    end
  end

endmodule
