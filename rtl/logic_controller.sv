// logic_controller -- two-vehicle movement controller (top level).
//
// Two vehicles wait at their starting points, W1 at a and W2 at c. Pressing
// m sends both to the right at once. When both have reached their ending
// points (W1 at b, W2 at d, in either order) W1 drives back to a, and only
// then W2 drives back to c, after which the cycle can start again.
//
// The controller is the synchronous form of a Control Interpreted Petri net
// with 10 places and 9 transitions, stored as its global state. Three
// registers advance together on every clock edge:
//   lc_input_encoder  the input variable: which awaited sensor is active,
//   lc_state_machine  the global state of the net,
//   lc_output_logic   the actuator registers r1, r2, l1, l2.
// All three read the state and input variable of the previous step, so the
// whole controller is one synchronous step per clock, with no combinational
// path from a sensor to an actuator.
//
// Timing: a sensor seen at clock edge k is in the input variable after edge
// k, and the state change and actuator change it causes appear after edge
// k+1. Unconditional steps (P1->P2P3, P10P11->P12, P12->P13) take one clock.
//
// The safety and next-step requirements that the specification lists as
// satisfied are checked here as concurrent assertions. They are disabled
// during reset with `disable iff (!rst_n)`, which is why lint reports rst_n
// as used both asynchronously (the registers) and synchronously (the
// assertions); the assertions do not synthesize, so the warning stands.
//
// Ports: clk, rst_n (active-low, asynchronous; resets to state P1, input
// none, all actuators off); sensors m, a, b, c, d; actuators r1, r2, l1, l2;
// the global state `state` (lc_pkg::gstate_e code) and the input variable
// `input_code` (lc_pkg::input_e code), brought out for observation.
module logic_controller
  import lc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       m,
  input  logic       a,
  input  logic       b,
  input  logic       c,
  input  logic       d,
  output logic       r1,
  output logic       r2,
  output logic       l1,
  output logic       l2,
  output logic [3:0] state,
  output logic [2:0] input_code
);

  sensors_t   sensors;
  input_e     input_q;
  gstate_e    gstate;
  actuators_t act;

  assign sensors = '{m: m, a: a, b: b, c: c, d: d};

  lc_input_encoder u_input (
    .clk     (clk),
    .rst_n   (rst_n),
    .state   (gstate),
    .sensors (sensors),
    .input_q (input_q)
  );

  lc_state_machine u_state (
    .clk     (clk),
    .rst_n   (rst_n),
    .input_q (input_q),
    .state   (gstate)
  );

  lc_output_logic u_out (
    .clk     (clk),
    .rst_n   (rst_n),
    .state   (gstate),
    .input_q (input_q),
    .act     (act)
  );

  assign r1         = act.r1;
  assign r2         = act.r2;
  assign l1         = act.l1;
  assign l2         = act.l2;
  assign state      = gstate;
  assign input_code = input_q;

  // Requirements of the controller specification.
  // A vehicle is never driven right and left at the same time.
  a_w1_not_both_ways: assert property (@(posedge clk) disable iff (!rst_n)
    !(act.l1 && act.r1));
  a_w2_not_both_ways: assert property (@(posedge clk) disable iff (!rst_n)
    !(act.l2 && act.r2));
  // m starts both vehicles on the next step.
  a_start: assert property (@(posedge clk) disable iff (!rst_n)
    input_q == IN_M |=> act.r1 && act.r2);
  // Reaching an end point stops the vehicle on the next step.
  a_stop_w1_at_b: assert property (@(posedge clk) disable iff (!rst_n)
    input_q == IN_B |=> !act.r1);
  a_stop_w2_at_d: assert property (@(posedge clk) disable iff (!rst_n)
    input_q == IN_D |=> !act.r2);
  a_stop_w1_at_a: assert property (@(posedge clk) disable iff (!rst_n)
    input_q == IN_A |=> !act.l1);
  a_stop_w2_at_c: assert property (@(posedge clk) disable iff (!rst_n)
    input_q == IN_C |=> !act.l2);

endmodule
