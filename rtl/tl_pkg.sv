// Shared types and constants of the traffic light controller.
// The parameter numbers (00 base, 01 extended, 10 yellow) and the reset
// values 6 s, 3 s and 2 s are the ones of the controller's timing table.
// The lamp bundle follows the order R_m, Y_m, G_m, R_s, Y_s, G_s, Walk.
// The state encoding is this design's own choice.
package tl_pkg;

  // Parameter number used to address the time parameter memory.
  typedef enum logic [1:0] {
    P_BASE = 2'b00,
    P_EXT  = 2'b01,
    P_YEL  = 2'b10
  } interval_t;

  localparam logic [3:0] T_BASE_RESET = 4'd6;
  localparam logic [3:0] T_EXT_RESET  = 4'd3;
  localparam logic [3:0] T_YEL_RESET  = 4'd2;

  // Seven lamp outputs, most significant first.
  typedef struct packed {
    logic r_m;
    logic y_m;
    logic g_m;
    logic r_s;
    logic y_s;
    logic g_s;
    logic walk;
  } lights_t;

  // Controller states. MAIN_GRN1 is the first t_BASE of main green;
  // MAIN_GRN2 the second one, replaced by MAIN_EXT (t_EXT) when a side
  // street car is waiting. SIDE_EXT is the t_EXT extension of side green.
  typedef enum logic [2:0] {
    S_MAIN_GRN1,
    S_MAIN_GRN2,
    S_MAIN_EXT,
    S_MAIN_YEL,
    S_WALK,
    S_SIDE_GRN,
    S_SIDE_EXT,
    S_SIDE_YEL
  } state_t;

endpackage
