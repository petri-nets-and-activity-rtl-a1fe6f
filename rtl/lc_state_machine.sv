// lc_state_machine -- global-state register of the reduced Petri net.
//
// The controller's Petri net has 10 places (P1, P2, P3, P6, P7, P10, P11,
// P12, P13, P15) and 9 transitions. Rather than one flip-flop per place, the
// state is kept as the global state, i.e. the set of places marked together,
// of which only nine are reachable. One clock step is one step of the net:
//
//   P1     -> P2P3           always  (fork: both vehicles get ready)
//   P2P3   -> P6P7   on m            (both start moving right; the two
//                                     transitions share the condition m and
//                                     fire in the same step)
//   P6P7   -> P7P10  on b            (W1 reached b first)
//   P6P7   -> P6P11  on d            (W2 reached d first)
//   P7P10  -> P10P11 on d
//   P6P11  -> P10P11 on b
//   P10P11 -> P12            always  (join of the two branches)
//   P12    -> P13            always  (W1 starts its return)
//   P13    -> P15    on a            (W1 home, W2 starts its return)
//   P15    -> P1     on c            (W2 home, cycle complete)
//
// Any other (state, input) pair keeps the state. This table follows the
// specification's model; the binary state codes are this design's choice.
//
// Interface: clk, active-low asynchronous rst_n, the registered input
// variable `input_q`; output `state`, registered, reset to P1.
// Timing: the state moves one clock after the input variable shows the
// awaited sensor; unconditional steps take one clock each.
module lc_state_machine
  import lc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  input_e  input_q,
  output gstate_e state
);

  gstate_e state_d;

  always_comb begin
    state_d = state;
    unique case (state)
      GS_P1:     state_d = GS_P2P3;
      GS_P2P3:   if (input_q == IN_M) state_d = GS_P6P7;
      GS_P6P7: begin
        if (input_q == IN_B)      state_d = GS_P7P10;
        else if (input_q == IN_D) state_d = GS_P6P11;
      end
      GS_P7P10:  if (input_q == IN_D) state_d = GS_P10P11;
      GS_P6P11:  if (input_q == IN_B) state_d = GS_P10P11;
      GS_P10P11: state_d = GS_P12;
      GS_P12:    state_d = GS_P13;
      GS_P13:    if (input_q == IN_A) state_d = GS_P15;
      GS_P15:    if (input_q == IN_C) state_d = GS_P1;
      default:   state_d = GS_P1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= GS_P1;
    else        state <= state_d;
  end

endmodule
