// lc_input_encoder -- the controller's input variable.
//
// The controller reacts to one sensor at a time. This block samples the five
// sensor wires on each clock edge and stores which single one of them the
// controller will act on next, as an input_e code (none, m, a, b, c, d).
// Only sensors that the current global state is waiting for are let through:
//
//   P2P3  : m        P6P7 : b, d      P6P11 : b      P7P10 : d
//   P13   : a        P15  : c         P1, P10P11, P12 : none
//
// This per-state list is the one of the specification's model, where it is
// what keeps the model to the inputs that can occur in each state. Here it
// also lets a sensor that stays active (a vehicle parked on its end switch)
// go unseen once the controller has moved on.
//
// Design choices, not taken from the specification: when two awaited sensors
// are active in the same cycle (only possible in P6P7, both vehicles arriving
// together) b is taken first and d is taken on the next step, since P7P10
// still awaits d. Sensor wires are expected to be synchronous to clk already.
//
// Interface: clk, active-low asynchronous rst_n, the current global state
// `state`, the sensor wires `sensors`; output `input_q`, registered.
// Timing: input_q reflects the sensors sampled at the previous rising edge
// together with the state that held before that edge. Reset value: none.
module lc_input_encoder
  import lc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  gstate_e  state,
  input  sensors_t sensors,
  output input_e   input_q
);

  input_e input_d;

  always_comb begin
    input_d = IN_NONE;
    unique case (state)
      GS_P2P3:  if (sensors.m) input_d = IN_M;
      GS_P6P7: begin
        if (sensors.b)      input_d = IN_B;
        else if (sensors.d) input_d = IN_D;
      end
      GS_P6P11: if (sensors.b) input_d = IN_B;
      GS_P7P10: if (sensors.d) input_d = IN_D;
      GS_P13:   if (sensors.a) input_d = IN_A;
      GS_P15:   if (sensors.c) input_d = IN_C;
      default:  input_d = IN_NONE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) input_q <= IN_NONE;
    else        input_q <= input_d;
  end

endmodule
