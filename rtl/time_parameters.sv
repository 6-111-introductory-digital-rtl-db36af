// Time parameter memory: three 4-bit registers holding t_BASE, t_EXT and
// t_YEL in seconds, addressed by the 2-bit parameter number (00, 01, 10).
// The controller FSM supplies the read address (interval) and the timer
// reads value combinationally. While prog (the synchronized Reprogram
// button) is high, the register chosen by sel is written with time_value
// at each clock edge. Reset loads 6, 3 and 2 seconds.
// Parameter number 11 has no register here: it reads as 0 and writes to it
// are dropped, which is this design's choice.
module time_parameters
  import tl_pkg::*;
#(
  parameter logic [3:0] T_BASE_DEFAULT = T_BASE_RESET,
  parameter logic [3:0] T_EXT_DEFAULT  = T_EXT_RESET,
  parameter logic [3:0] T_YEL_DEFAULT  = T_YEL_RESET
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       prog,
  input  logic [1:0] sel,
  input  logic [3:0] time_value,
  input  interval_t  interval,
  output logic [3:0] value
);

  logic [3:0] t_base, t_ext, t_yel;

  always_ff @(posedge clk) begin
    if (rst) begin
      t_base <= T_BASE_DEFAULT;
      t_ext  <= T_EXT_DEFAULT;
      t_yel  <= T_YEL_DEFAULT;
    end else if (prog) begin
      case (sel)
        P_BASE:  t_base <= time_value;
        P_EXT:   t_ext  <= time_value;
        P_YEL:   t_yel  <= time_value;
        default: ;
      endcase
    end
  end

  always_comb begin
    case (interval)
      P_BASE:  value = t_base;
      P_EXT:   value = t_ext;
      P_YEL:   value = t_yel;
      default: value = 4'd0;
    endcase
  end

endmodule
