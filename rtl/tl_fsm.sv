// Traffic light controller FSM (Moore). One cycle through the intersection:
//   MAIN_GRN1 (t_BASE) -> MAIN_GRN2 (t_BASE), or MAIN_EXT (t_EXT) when the
//   side street sensor is high as the first t_BASE ends -> MAIN_YEL (t_YEL)
//   -> WALK (t_EXT, all traffic red, walk lamp on) if a walk request is
//   registered -> SIDE_GRN (t_BASE) -> SIDE_EXT (t_EXT) if the sensor is
//   high as side green ends -> SIDE_YEL (t_YEL) -> MAIN_GRN1.
// Each state names the time parameter it needs on interval and gives a
// registered one-cycle start_timer pulse in its first cycle; the state
// moves on when the timer reports expired. wr_reset is held high in WALK,
// clearing the walk register and blocking new requests during the walk.
// A synchronized Reprogram (prog) restarts the cycle at MAIN_GRN1 so the
// new times take effect at once.
// The sequence, the sensor and walk deviations and the signal names follow
// the lab description and block diagram. The state encoding, the start
// pulse and what the FSM does on reprogram are this design's choices.
module tl_fsm
  import tl_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      sensor,
  input  logic      wr,
  input  logic      prog,
  input  logic      expired,
  output logic      wr_reset,
  output interval_t interval,
  output logic      start_timer,
  output lights_t   lights
);

  state_t state, state_n;

  // Next state, taken only when the running interval has expired.
  always_comb begin
    state_n = state;
    if (expired && !start_timer) begin
      unique case (state)
        S_MAIN_GRN1: state_n = sensor ? S_MAIN_EXT : S_MAIN_GRN2;
        S_MAIN_GRN2: state_n = S_MAIN_YEL;
        S_MAIN_EXT:  state_n = S_MAIN_YEL;
        S_MAIN_YEL:  state_n = wr ? S_WALK : S_SIDE_GRN;
        S_WALK:      state_n = S_SIDE_GRN;
        S_SIDE_GRN:  state_n = sensor ? S_SIDE_EXT : S_SIDE_YEL;
        S_SIDE_EXT:  state_n = S_SIDE_YEL;
        S_SIDE_YEL:  state_n = S_MAIN_GRN1;
        default:     state_n = S_MAIN_GRN1;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst || prog) begin
      state       <= S_MAIN_GRN1;
      start_timer <= 1'b1;
    end else begin
      state       <= state_n;
      start_timer <= (state_n != state);
    end
  end

  // Interval each state is timed by.
  always_comb begin
    unique case (state)
      S_MAIN_GRN1, S_MAIN_GRN2, S_SIDE_GRN: interval = P_BASE;
      S_MAIN_EXT, S_WALK, S_SIDE_EXT:       interval = P_EXT;
      default:                              interval = P_YEL;
    endcase
  end

  // Lamp decode: whenever one street is green or yellow the other is red.
  always_comb begin
    lights = '0;
    unique case (state)
      S_MAIN_GRN1, S_MAIN_GRN2, S_MAIN_EXT: begin lights.g_m = 1'b1; lights.r_s = 1'b1; end
      S_MAIN_YEL:                           begin lights.y_m = 1'b1; lights.r_s = 1'b1; end
      S_WALK:                     begin lights.r_m = 1'b1; lights.r_s = 1'b1; lights.walk = 1'b1; end
      S_SIDE_GRN, S_SIDE_EXT:               begin lights.g_s = 1'b1; lights.r_m = 1'b1; end
      default:                              begin lights.y_s = 1'b1; lights.r_m = 1'b1; end
    endcase
  end

  assign wr_reset = (state == S_WALK);

  // At most one street may show green or yellow.
  a_one_street: assert property (@(posedge clk) disable iff (rst)
    !((lights.g_m || lights.y_m) && (lights.g_s || lights.y_s)));

endmodule
