// Self-checking testbench of feedback_regulator. A reference model here, in
// 64-bit integer arithmetic, computes the PI output for random references,
// measurements and gains, including saturation of the output and of the
// integrator. Checked: every output value, the two-clock latency from
// adc_valid to m_valid, no output without a sample, and the cleared
// integrator and zero output while disabled.
module tb_feedback_regulator;

  logic clk = 0, rst_n = 0, enable = 0, adc_valid = 0;
  logic signed [23:0] i_meas = '0, i_ref = '0;
  logic [15:0] kp = '0, ki = '0;
  logic signed [15:0] m;
  logic m_valid;
  logic signed [24:0] err;
  logic signed [31:0] integ_mon;

  int checks = 0, failures = 0;
  int n_pos_sat = 0, n_neg_sat = 0, n_int_sat = 0;

  feedback_regulator dut (.*);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  longint model_i = 0;

  function automatic longint clampl(input longint v, input longint lo, input longint hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  // one sample: drive, wait for the result, compare with the model
  task automatic sample(input int ref_v, input int meas_v);
    longint e, u, mexp;
    @(negedge clk);
    i_ref = 24'(ref_v); i_meas = 24'(meas_v); adc_valid = 1;
    @(negedge clk);
    adc_valid = 0;
    check(!m_valid, "no m_valid one clock after the sample");
    @(negedge clk);
    check(m_valid, "m_valid two clocks after the sample");
    e = longint'(ref_v) - longint'(meas_v);
    model_i = model_i + e * longint'(ki);
    if (model_i > 64'sd2147483647 || model_i < -64'sd2147483648) n_int_sat++;
    model_i = clampl(model_i, -64'sd2147483648, 64'sd2147483647);
    u = (e * longint'(kp) + model_i) >>> 16;
    if (u > 32767) n_pos_sat++;
    if (u < -32768) n_neg_sat++;
    mexp = clampl(u, -32768, 32767);
    check(m == 16'(mexp), $sformatf("m=%0d expected %0d (e=%0d kp=%0d ki=%0d)", m, mexp, e, kp, ki));
    check(err == 25'(e), "error output");
    @(negedge clk);
    check(!m_valid, "m_valid is a single pulse");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // disabled: no output
    @(negedge clk) begin i_ref = 24'sd1000; adc_valid = 1; end
    @(negedge clk) adc_valid = 0;
    repeat (3) begin
      @(negedge clk);
      check(!m_valid && m == 0, "disabled: no output");
    end
    enable = 1;
    kp = 16'd32768; ki = 16'd1000;
    for (int k = 0; k < 200; k++) sample(100000, 100000 - 50 * k);
    for (int k = 0; k < 2000; k++) begin
      if (k % 100 == 0) begin kp = 16'($urandom); ki = 16'($urandom_range(0, 4000)); end
      sample(int'($urandom_range(0, 200000)) - 100000, int'($urandom_range(0, 200000)) - 100000);
    end
    // large errors: output and integrator saturation
    kp = 16'hFFFF; ki = 16'hFFFF;
    for (int k = 0; k < 50; k++) sample(8388607, -8388608);
    for (int k = 0; k < 100; k++) sample(-8388608, 8388607);
    check(n_pos_sat > 0 && n_neg_sat > 0 && n_int_sat > 0, "saturation cases exercised");
    // disable clears the integrator
    @(negedge clk) enable = 0;
    @(negedge clk);
    check(integ_mon == 0 && m == 0, "disable clears the loop");
    enable = 1; model_i = 0;
    kp = 16'd0; ki = 16'd65535;
    sample(1000, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
