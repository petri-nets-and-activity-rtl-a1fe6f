// lc_output_logic -- actuator registers of the controller.
//
// Each actuator output is a register that a transition sets or resets and
// that otherwise keeps its value, the way the actions of the activity diagram
// assign 1 or 0 to a signal:
//
//   r1 : set   in P2P3 on m;   reset in P6P7 or P6P11 on b
//   r2 : set   in P2P3 on m;   reset in P6P7 or P7P10 on d
//   l1 : set   in P13 while the input is not a;   reset in P13 on a
//   l2 : set   in P13 on a;    reset in P15 on c
//
// The conditions follow the specification's model line for line. With them
// W1 returns first (l1) and W2 only after W1 is home (l2), and a vehicle is
// never told to move both ways at once.
//
// Interface: clk, active-low asynchronous rst_n, the current global state
// `state` and input variable `input_q`; output `act`, registered, reset to
// all zero. Timing: an output changes on the same clock edge as the state
// transition that carries its action.
module lc_output_logic
  import lc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  gstate_e    state,
  input  input_e     input_q,
  output actuators_t act
);

  actuators_t act_d;

  always_comb begin
    act_d = act;
    // W1 moving right
    if (state == GS_P2P3 && input_q == IN_M)
      act_d.r1 = 1'b1;
    else if ((state == GS_P6P7 || state == GS_P6P11) && input_q == IN_B)
      act_d.r1 = 1'b0;
    // W2 moving right
    if (state == GS_P2P3 && input_q == IN_M)
      act_d.r2 = 1'b1;
    else if ((state == GS_P6P7 || state == GS_P7P10) && input_q == IN_D)
      act_d.r2 = 1'b0;
    // W1 moving left
    if (state == GS_P13)
      act_d.l1 = (input_q != IN_A);
    // W2 moving left
    if (state == GS_P13 && input_q == IN_A)
      act_d.l2 = 1'b1;
    else if (state == GS_P15 && input_q == IN_C)
      act_d.l2 = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) act <= '0;
    else        act <= act_d;
  end

endmodule
