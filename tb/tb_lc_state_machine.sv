// tb_lc_state_machine -- self-checking test of the global-state register.
//
// Feeds the state machine a random input value every clock, biased towards
// the inputs the current state awaits so that every transition fires many
// times, and compares the state after each edge with the reference
// transition list. Checks the reset state and counts how often each of the
// nine states was visited (each must be reached).
module tb_lc_state_machine;
  import lc_pkg::*;
  import lc_ref_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  input_e  input_q = IN_NONE;
  gstate_e state;

  int checks = 0;
  int failures = 0;
  int visits[9];

  lc_state_machine dut (.clk, .rst_n, .input_q, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gstate_e    exp, nx;
    actuators_t dummy;
    logic [4:0] aw;
    input_e     pick;
    input_q = IN_M;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (state !== GS_P1) begin failures++; $display("FAIL reset state"); end
    rst_n = 1'b1;
    exp = GS_P1;
    for (int i = 0; i < 5000; i++) begin
      aw = awaited(exp);
      case ($urandom % 4)
        0: pick = input_from_int($urandom);           // any input
        1: pick = IN_NONE;
        default: pick = ref_input(exp, aw & 5'($urandom)); // awaited
      endcase
      input_q = pick;
      step(exp, pick, '0, nx, dummy);
      @(posedge clk);
      #1;
      exp = nx;
      checks++;
      visits[int'(state)]++;
      if (state !== exp) begin
        failures++;
        $display("FAIL step %0d input=%s state=%s expected=%s",
                 i, pick.name(), state.name(), exp.name());
        exp = state;
      end
    end
    for (int s = 0; s < 9; s++) begin
      checks++;
      if (visits[s] == 0) begin
        failures++;
        $display("FAIL state %s never reached", state_from_int(s).name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
