// lc_pkg -- shared types of the two-vehicle logic controller.
//
// The controller is a synchronous implementation of a Control Interpreted
// Petri net (10 places, 9 transitions) for moving two vehicles W1 (track
// a..b) and W2 (track c..d). Its state is held as one of the nine global
// states (sets of simultaneously marked places) that the net can reach, its
// sensor inputs are reduced to one registered "input" value, and its four
// actuator outputs are set/reset registers.
//
// The global-state list, the input alphabet and the signal names follow the
// controller specification. The binary codes are this design's choice.
package lc_pkg;

  // Global states of the reduced Petri net. Each name lists the places that
  // hold a token at the same time (P2P3 = places P2 and P3 marked).
  typedef enum logic [3:0] {
    GS_P1     = 4'd0,
    GS_P2P3   = 4'd1,
    GS_P6P7   = 4'd2,
    GS_P6P11  = 4'd3,
    GS_P7P10  = 4'd4,
    GS_P10P11 = 4'd5,
    GS_P12    = 4'd6,
    GS_P13    = 4'd7,
    GS_P15    = 4'd8
  } gstate_e;

  // The single input variable: at most one sensor is seen per step.
  typedef enum logic [2:0] {
    IN_NONE = 3'd0,
    IN_M    = 3'd1,
    IN_A    = 3'd2,
    IN_B    = 3'd3,
    IN_C    = 3'd4,
    IN_D    = 3'd5
  } input_e;

  // Sensor wires of the controller.
  //   m : start button
  //   a : W1 at its starting point a     b : W1 at its ending point b
  //   c : W2 at its starting point c     d : W2 at its ending point d
  typedef struct packed {
    logic m;
    logic a;
    logic b;
    logic c;
    logic d;
  } sensors_t;

  // Actuator outputs of the controller.
  //   r1 / l1 : W1 moves right / left     r2 / l2 : W2 moves right / left
  typedef struct packed {
    logic r1;
    logic r2;
    logic l1;
    logic l2;
  } actuators_t;

endpackage
