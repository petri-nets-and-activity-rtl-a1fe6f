// tb_logic_controller -- end-to-end test of the two-vehicle controller.
//
// Part 1 closes the loop with a model of the two vehicles and runs complete
// work cycles: W1 reaching its end first, W2 first, both arriving in the same
// clock, and a second cycle after the first. Each cycle is checked for the
// order of movements (both right together, W1 back, then W2 back), for the
// two-clock reaction from a sensor to the actuator it stops, and against the
// reference model at every clock.
// Part 2 replays the counterexample of the requirement "after b, W1 finally
// returns": W2 never reaches d and the controller stays in P7P10 for good.
// Part 3 drives the sensor wires at random and counts the distinct
// (state, input, r1, r2, l1, l2) combinations reached; the controller's
// state space has 9 x 6 x 16 = 864 combinations of which 24 are reachable.
// Every mechanism is counted and one that never happened is a failure.
module tb_logic_controller;
  import lc_pkg::*;
  import lc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic m = 1'b0;
  logic a, b, c, d;
  logic r1, r2, l1, l2;
  logic [3:0] state_w;
  logic [2:0] input_w;

  // plant
  int unsigned len1 = 5, len2 = 9;
  logic stall2 = 1'b0;
  logic pa, pb, pc, pd, conflict1, conflict2;
  // random sensor source
  logic use_random = 1'b0;
  logic [3:0] rnd_abcd = '0;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  // mechanism counters
  int n_fork, n_w1_first, n_w2_first, n_same_clock, n_join, n_w1_return,
      n_w2_return, n_complete, n_stuck, n_priority;

  assign a = use_random ? rnd_abcd[3] : pa;
  assign b = use_random ? rnd_abcd[2] : pb;
  assign c = use_random ? rnd_abcd[1] : pc;
  assign d = use_random ? rnd_abcd[0] : pd;

  logic_controller dut (
    .clk, .rst_n, .m, .a, .b, .c, .d, .r1, .r2, .l1, .l2,
    .state(state_w), .input_code(input_w)
  );

  vehicles_model plant (
    .clk, .rst_n, .len1, .len2, .stall2, .r1, .l1, .r2, .l2,
    .a(pa), .b(pb), .c(pc), .d(pd), .conflict1, .conflict2
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic gstate_e st();
    return gstate_e'(state_w);
  endfunction

  // ---------------------------------------------------------------- reference
  // Lock-step reference model, updated on every clock edge from the values
  // the controller saw before the edge.
  gstate_e    ref_s;
  input_e     ref_in;
  actuators_t ref_act;
  logic       ref_on = 1'b0;

  always @(posedge clk) begin
    gstate_e    s_nx;
    actuators_t act_nx;
    input_e     in_nx;
    if (ref_on) begin
      step(ref_s, ref_in, ref_act, s_nx, act_nx);
      in_nx = ref_input(ref_s, {m, a, b, c, d});
      if (ref_s == GS_P6P7 && b && d) n_priority++;
      ref_s   <= s_nx;
      ref_in  <= in_nx;
      ref_act <= act_nx;
    end
  end

  always @(negedge clk) begin
    if (ref_on && rst_n) begin
      checks++;
      if (state_w !== 4'(ref_s) || input_w !== 3'(ref_in) ||
          {r1, r2, l1, l2} !== ref_act) begin
        failures++;
        $display("FAIL clk %0d: state=%0d input=%0d act=%b, expected %s %s %b",
                 cycle, state_w, input_w, {r1, r2, l1, l2},
                 ref_s.name(), ref_in.name(), ref_act);
      end
      if (conflict1 || conflict2) begin
        failures++;
        $display("FAIL clk %0d: a vehicle is driven both ways", cycle);
      end
    end
  end

  always @(posedge clk) cycle++;

  task automatic do_reset();
    ref_on = 1'b0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    ref_s = GS_P1;
    ref_in = IN_NONE;
    ref_act = '0;
    ref_on = 1'b1;
    checks++;
    if (st() != GS_P1 || {r1, r2, l1, l2} != 4'b0000 || input_w != 3'(IN_NONE)) begin
      failures++;
      $display("FAIL reset values");
    end
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL clk %0d: %s", cycle, what);
    end
  endtask

  // ------------------------------------------------------------ work cycle
  // One complete work cycle with the plant in the loop, starting in P2P3.
  task automatic work_cycle(int unsigned l_1, int unsigned l_2);
    int t_m, t_r1_off, t_r2_off, t_b, t_d, t_l1_on, t_l1_off, t_l2_on,
        t_l2_off, t_a, t_c;
    bit seen_join;
    len1 = l_1;
    len2 = l_2;
    @(negedge clk);
    check(st() == GS_P2P3, "waiting for m in P2P3");
    // press m for one clock
    m = 1'b1;
    @(posedge clk);
    t_m = cycle;
    @(negedge clk);
    m = 1'b0;
    @(negedge clk);
    check(r1 && r2, "both vehicles start together, two clocks after m");
    if (r1 && r2) n_fork++;
    t_b = 0; t_d = 0; t_r1_off = 0; t_r2_off = 0; t_l1_on = 0; t_l1_off = 0;
    t_l2_on = 0; t_l2_off = 0; t_a = 0; t_c = 0; seen_join = 0;
    // follow the cycle until back in P2P3
    for (int i = 0; i < 4 * (l_1 + l_2) + 40; i++) begin
      @(posedge clk);
      #1;
      if (b && t_b == 0 && t_r1_off == 0) t_b = cycle;
      if (d && t_d == 0 && t_r2_off == 0) t_d = cycle;
      if (!r1 && t_r1_off == 0) t_r1_off = cycle;
      if (!r2 && t_r2_off == 0) t_r2_off = cycle;
      if (l1 && t_l1_on == 0) t_l1_on = cycle;
      if (!l1 && t_l1_on != 0 && t_l1_off == 0) t_l1_off = cycle;
      if (l2 && t_l2_on == 0) t_l2_on = cycle;
      if (!l2 && t_l2_on != 0 && t_l2_off == 0) t_l2_off = cycle;
      if (st() == GS_P10P11) seen_join = 1;
      if (st() == GS_P2P3 && t_l2_off != 0) break;
    end
    check(t_l2_off != 0, "work cycle completes");
    if (t_l2_off != 0) n_complete++;
    if (seen_join) n_join++;
    // A sensor that rises with edge t_b is stored in the input variable at
    // the next edge and the actuator changes one edge after that. When W1
    // arrives first, b is still active and awaited for one more step, so d
    // cannot be taken before edge t_b + 3.
    if (t_b < t_d) begin
      n_w1_first++;
      check(t_r1_off == t_b + 2, "r1 drops two clocks after b");
      check(t_r2_off == ((t_d + 2 > t_b + 4) ? t_d + 2 : t_b + 4),
            "r2 drops two clocks after d, or once b has been taken");
    end else if (t_d < t_b) begin
      n_w2_first++;
      check(t_r1_off == t_b + 2, "r1 drops two clocks after b");
      check(t_r2_off == t_d + 2, "r2 drops two clocks after d");
    end else begin
      n_same_clock++;
      check(t_r1_off == t_b + 2, "b taken first when both arrive");
      check(t_r2_off == t_d + 4, "d taken once b has been taken");
    end
    // returns: W1 only after both stopped, three steps after the join input
    check(t_l1_on > t_r1_off && t_l1_on > t_r2_off, "W1 returns after both arrived");
    check(t_l1_on == ((t_r1_off > t_r2_off) ? t_r1_off : t_r2_off) + 3,
          "W1 return starts three clocks after the join (P10P11, P12, P13)");
    if (t_l1_on != 0) n_w1_return++;
    check(t_l2_on == t_l1_off && t_l2_on != 0, "W2 starts back when W1 stops at a");
    if (t_l2_on != 0) n_w2_return++;
    check(t_l2_off > t_l2_on, "W2 stops at c");
  endtask

  // ------------------------------------------------------------ main
  bit [863:0] seen;
  int reached;

  initial begin
    do_reset();
    @(negedge clk);
    check(st() == GS_P2P3, "P1 -> P2P3 without input");
    work_cycle(5, 9);     // W1 first
    work_cycle(9, 5);     // W2 first
    work_cycle(6, 6);     // both in the same clock
    work_cycle(1, 2);     // short tracks

    // Counterexample: W2 stuck, W1 never goes back.
    do_reset();
    len1 = 4; len2 = 7;
    stall2 = 1'b1;
    check(st() == GS_P1 && input_w == 3'(IN_NONE), "trace: P1, input none");
    @(negedge clk);
    check(st() == GS_P2P3, "trace: P2P3");
    m = 1'b1;
    @(negedge clk);
    m = 1'b0;
    check(st() == GS_P2P3 && input_w == 3'(IN_M), "trace: input m");
    @(negedge clk);
    check(st() == GS_P6P7 && r1 && r2, "trace: P6P7, r1 = r2 = 1");
    wait (input_w == 3'(IN_B));
    @(negedge clk);
    check(st() == GS_P6P7 && r1, "trace: input b");
    @(negedge clk);
    check(st() == GS_P7P10 && !r1 && r2 && !l1, "trace: P7P10, r1 = 0");
    repeat (300) begin
      @(negedge clk);
      if (st() != GS_P7P10 || l1) begin
        failures++;
        $display("FAIL stuck case left P7P10");
        break;
      end
    end
    if (st() == GS_P7P10 && !l1) n_stuck++;
    stall2 = 1'b0;

    // Random sensors: reachable part of the state space.
    do_reset();
    use_random = 1'b1;
    seen = '0;
    for (int i = 0; i < 40000; i++) begin
      {m, rnd_abcd} = 5'($urandom);
      @(negedge clk);
      seen[state_w * 96 + input_w * 16 + 32'({r1, r2, l1, l2})] = 1'b1;
    end
    use_random = 1'b0;
    m = 1'b0;
    reached = $countones(seen);
    $display("reachable combinations: %0d of %0d", reached, 9 * 6 * 16);
    check(reached == 24, "24 reachable combinations");

    $display("mechanisms: fork=%0d w1_first=%0d w2_first=%0d same_clock=%0d priority=%0d join=%0d w1_return=%0d w2_return=%0d complete=%0d stuck=%0d",
             n_fork, n_w1_first, n_w2_first, n_same_clock, n_priority, n_join,
             n_w1_return, n_w2_return, n_complete, n_stuck);
    check(n_fork > 0, "fork happened");
    check(n_w1_first > 0, "W1 arrived first");
    check(n_w2_first > 0, "W2 arrived first");
    check(n_same_clock > 0, "both arrived together");
    check(n_priority > 0, "b/d priority used");
    check(n_join > 0, "join happened");
    check(n_w1_return > 0, "W1 returned");
    check(n_w2_return > 0, "W2 returned");
    check(n_complete > 1, "work cycle restarted");
    check(n_stuck > 0, "stuck vehicle case");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
