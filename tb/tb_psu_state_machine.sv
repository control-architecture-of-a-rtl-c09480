// Self-checking testbench of psu_state_machine: reset state, Setting Up
// forcing the tripped state, reset/on/off commands, masked and unmasked
// interlocks with the two-clock synchroniser latency, the latched trip cause
// and the digital outputs.
module tb_psu_state_machine;
  import dpsc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [15:0] ilk_in = '0, ilk_mask = 16'hFFFF;
  logic setting_up = 0, cmd_on = 0, cmd_off = 0, cmd_reset = 0;
  logic [4:0] user_out = 5'b10101;
  psu_state_e state;
  logic regulate;
  logic [15:0] ilk_sync, trip_cause;
  logic [7:0] dig_out;

  int checks = 0, failures = 0;

  psu_state_machine dut (.*);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (state %s)", what, state.name());
    end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  task automatic expect_outputs(input psu_state_e st);
    check(state == st, $sformatf("state %s expected", st.name()));
    check(regulate == (st == ST_ON), "regulate");
    check(dig_out[0] == (st == ST_ON) && dig_out[1] == (st == ST_TRIPPED) && dig_out[2] == (st == ST_OFF),
          "dig_out state bits");
    check(dig_out[7:3] == ((st == ST_TRIPPED) ? 5'b0 : user_out), "dig_out user bits");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_outputs(ST_TRIPPED);
    // reset without Setting Up: stays tripped
    pulse(cmd_reset);
    expect_outputs(ST_TRIPPED);
    setting_up = 1;
    pulse(cmd_on);                 // on is ignored while tripped
    expect_outputs(ST_TRIPPED);
    pulse(cmd_reset);
    expect_outputs(ST_OFF);
    pulse(cmd_on);
    expect_outputs(ST_ON);
    pulse(cmd_off);
    expect_outputs(ST_OFF);
    pulse(cmd_on);
    expect_outputs(ST_ON);
    // interlock 5: trips after the two-flop synchroniser plus the state flop
    @(negedge clk) ilk_in[5] = 1;
    @(negedge clk) check(state == ST_ON, "no trip before synchroniser");
    @(negedge clk) check(state == ST_ON, "no trip after one synchroniser stage");
    @(negedge clk) expect_outputs(ST_TRIPPED);
    check(trip_cause == 16'h0020, $sformatf("trip cause %h", trip_cause));
    // reset refused while the interlock is active
    pulse(cmd_reset);
    expect_outputs(ST_TRIPPED);
    @(negedge clk) ilk_in[5] = 0;
    repeat (3) @(negedge clk);
    check(trip_cause == 16'h0020, "trip cause held");
    pulse(cmd_reset);
    expect_outputs(ST_OFF);
    check(trip_cause == 16'h0000, "trip cause cleared by reset");
    // masked interlock does nothing
    ilk_mask = 16'hFF7F;
    @(negedge clk) ilk_in[7] = 1;
    repeat (4) @(negedge clk);
    expect_outputs(ST_OFF);
    check(ilk_sync[7] == 1'b1, "synchronised input visible");
    pulse(cmd_on);
    expect_outputs(ST_ON);
    // Setting Up cleared (parameters being changed): trip
    @(negedge clk) setting_up = 0;
    @(negedge clk) expect_outputs(ST_TRIPPED);
    check(trip_cause == 16'h0000, "no interlock cause for a parameter trip");
    @(negedge clk) setting_up = 1;
    pulse(cmd_reset);
    expect_outputs(ST_OFF);
    // off and on in the same clock: stays off
    @(negedge clk) begin cmd_on = 1; cmd_off = 1; end
    @(negedge clk) begin cmd_on = 0; cmd_off = 0; end
    expect_outputs(ST_OFF);
    // two interlocks at once, both latched
    pulse(cmd_on);
    @(negedge clk) ilk_in = 16'h8001;
    repeat (3) @(negedge clk);
    expect_outputs(ST_TRIPPED);
    check(trip_cause == 16'h8001, $sformatf("trip cause %h", trip_cause));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
