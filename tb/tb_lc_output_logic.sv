// tb_lc_output_logic -- self-checking test of the actuator registers.
//
// Applies every (state, input) pair from several starting actuator values,
// then a long random sequence, and compares r1, r2, l1, l2 after each clock
// edge with the reference transition list. Also checks the reset value.
module tb_lc_output_logic;
  import lc_pkg::*;
  import lc_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  gstate_e    state = GS_P1;
  input_e     input_q = IN_NONE;
  actuators_t act;

  int checks = 0;
  int failures = 0;

  lc_output_logic dut (.clk, .rst_n, .state, .input_q, .act);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one (state, input) pair and check the actuators that follow.
  task automatic apply(gstate_e s, input_e in);
    actuators_t exp;
    gstate_e    dummy;
    state   = s;
    input_q = in;
    step(s, in, act, dummy, exp);
    @(posedge clk);
    #1;
    checks++;
    if (act !== exp) begin
      failures++;
      $display("FAIL state=%s input=%s act=%b expected=%b",
               s.name(), in.name(), act, exp);
    end
  endtask

  initial begin
    state = GS_P2P3;
    input_q = IN_M;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (act !== '0) begin failures++; $display("FAIL reset value %b", act); end
    rst_n = 1'b1;
    // drive the actuators to a chosen value, then try every pair from it
    for (int v = 0; v < 16; v++)
      for (int s = 0; s < 9; s++)
        for (int in = 0; in < 6; in++) begin
          // set r1/r2 through P2P3+m, l1 through P13, l2 through P13+a
          apply(GS_P15, IN_C);
          apply(GS_P6P7, IN_B);
          apply(GS_P6P7, IN_D);
          apply(GS_P13, IN_A);
          apply(GS_P15, IN_C);
          if (v[3] || v[2]) apply(GS_P2P3, IN_M);
          if (!v[3])        apply(GS_P6P7, IN_B);
          if (!v[2])        apply(GS_P6P7, IN_D);
          if (v[0])         apply(GS_P13, IN_A);
          if (v[1])         apply(GS_P13, IN_NONE);
          apply(state_from_int(s), input_from_int(in));
        end
    for (int i = 0; i < 3000; i++)
      apply(state_from_int($urandom), input_from_int($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
