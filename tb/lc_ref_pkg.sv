// lc_ref_pkg -- reference model of the two-vehicle controller for the
// testbenches.
//
// The controller is written here a second way, as the transition list of its
// Petri net: each entry names the global state it fires from, the input that
// enables it (or none needed), the state it leads to and the actuators it
// sets and clears. The l1 rule of state P13 (l1 is driven while the input is
// not a) is kept apart, as it is not tied to a single transition. The
// testbenches compare the RTL with this list step by step.
package lc_ref_pkg;
  import lc_pkg::*;

  typedef struct packed {
    gstate_e    from;
    logic       uncond;   // fires whatever the input
    input_e     cond;     // enabling input when uncond is 0
    gstate_e    to;
    actuators_t set;
    actuators_t clr;
  } trans_t;

  localparam int NUM_TRANS = 10;

  // r1, r2, l1, l2 bit masks
  localparam actuators_t R1 = 4'b1000;
  localparam actuators_t R2 = 4'b0100;
  localparam actuators_t L1 = 4'b0010;
  localparam actuators_t L2 = 4'b0001;
  localparam actuators_t NO = 4'b0000;

  function automatic trans_t trans(int i);
    case (i)
      0: return '{GS_P1,     1'b1, IN_NONE, GS_P2P3,   NO,      NO};
      1: return '{GS_P2P3,   1'b0, IN_M,    GS_P6P7,   R1 | R2, NO};
      2: return '{GS_P6P7,   1'b0, IN_B,    GS_P7P10,  NO,      R1};
      3: return '{GS_P6P7,   1'b0, IN_D,    GS_P6P11,  NO,      R2};
      4: return '{GS_P7P10,  1'b0, IN_D,    GS_P10P11, NO,      R2};
      5: return '{GS_P6P11,  1'b0, IN_B,    GS_P10P11, NO,      R1};
      6: return '{GS_P10P11, 1'b1, IN_NONE, GS_P12,    NO,      NO};
      7: return '{GS_P12,    1'b1, IN_NONE, GS_P13,    NO,      NO};
      8: return '{GS_P13,    1'b0, IN_A,    GS_P15,    L2,      L1};
      default: return '{GS_P15, 1'b0, IN_C, GS_P1,     NO,      L2};
    endcase
  endfunction

  // One step of the reference: next state and next actuators.
  function automatic void step(input gstate_e s, input input_e in,
                               input actuators_t act_in,
                               output gstate_e s_nx, output actuators_t act_nx);
    trans_t t;
    s_nx   = s;
    act_nx = act_in;
    for (int i = 0; i < NUM_TRANS; i++) begin
      t = trans(i);
      if (t.from == s && (t.uncond || t.cond == in)) begin
        s_nx   = t.to;
        act_nx = (act_in & ~t.clr) | t.set;
      end
    end
    if (s == GS_P13 && in != IN_A) act_nx = act_nx | L1;
  endfunction

  // Sensors awaited by each state, as an {m,a,b,c,d} mask: the inputs that
  // enable a transition out of it.
  function automatic logic [4:0] awaited(gstate_e s);
    logic [4:0] mask;
    trans_t t;
    mask = '0;
    for (int i = 0; i < NUM_TRANS; i++) begin
      t = trans(i);
      if (t.from == s && !t.uncond)
        case (t.cond)
          IN_M: mask[4] = 1'b1;
          IN_A: mask[3] = 1'b1;
          IN_B: mask[2] = 1'b1;
          IN_C: mask[1] = 1'b1;
          IN_D: mask[0] = 1'b1;
          default: ;
        endcase
    end
    return mask;
  endfunction

  // The input value the controller should record: the first awaited sensor
  // that is active, in the order m, a, b, c, d.
  function automatic input_e ref_input(gstate_e s, logic [4:0] sens);
    logic [4:0] hit;
    hit = sens & awaited(s);
    if (hit[4]) return IN_M;
    if (hit[3]) return IN_A;
    if (hit[2]) return IN_B;
    if (hit[1]) return IN_C;
    if (hit[0]) return IN_D;
    return IN_NONE;
  endfunction

  function automatic gstate_e state_from_int(int unsigned v);
    return gstate_e'(4'(v % 9));
  endfunction

  function automatic input_e input_from_int(int unsigned v);
    return input_e'(3'(v % 6));
  endfunction

endpackage
