// tb_lc_input_encoder -- self-checking test of the input variable register.
//
// Drives every global state with random sensor patterns (and all 32 patterns
// per state once), and checks after each clock edge that the stored input is
// the first awaited active sensor of the reference model, or none. Also
// checks the reset value and that the register holds one clock of latency.
module tb_lc_input_encoder;
  import lc_pkg::*;
  import lc_ref_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  gstate_e  state = GS_P1;
  sensors_t sensors = '0;
  input_e   input_q;

  int checks = 0;
  int failures = 0;

  lc_input_encoder dut (.clk, .rst_n, .state, .sensors, .input_q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(gstate_e s, logic [4:0] sens);
    input_e exp;
    state   = s;
    sensors = sens;
    exp = ref_input(s, sens);
    @(posedge clk);
    #1;
    checks++;
    if (input_q !== exp) begin
      failures++;
      $display("FAIL state=%s sensors=%b input=%s expected=%s",
               s.name(), sens, input_q.name(), exp.name());
    end
  endtask

  initial begin
    sensors = '1;
    state   = GS_P2P3;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (input_q !== IN_NONE) begin
      failures++;
      $display("FAIL reset value %s", input_q.name());
    end
    rst_n = 1'b1;
    // every state with every sensor pattern
    for (int s = 0; s < 9; s++)
      for (int p = 0; p < 32; p++)
        apply(state_from_int(s), 5'(p));
    // random sequence
    for (int i = 0; i < 3000; i++)
      apply(state_from_int($urandom), 5'($urandom));
    // specific: b and d together while both vehicles move -> b first
    apply(GS_P6P7, 5'b00101);
    checks++;
    if (input_q !== IN_B) begin failures++; $display("FAIL b/d priority"); end
    // a held sensor that the state does not await is not recorded
    apply(GS_P1, 5'b11111);
    checks++;
    if (input_q !== IN_NONE) begin failures++; $display("FAIL P1 not none"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
