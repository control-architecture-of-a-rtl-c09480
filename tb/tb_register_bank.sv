// Self-checking testbench of register_bank: write and read back every
// parameter register, the one-clock command pulses, the Setting Up bit
// (clear after reset, cleared by any parameter write, set by the
// parameter-done register), the decoding of the select and scope fields, the
// monitored read-only registers and the one-clock read latency.
module tb_register_bank;
  import dpsc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] addr = '0;
  logic wr = 0, rd = 0;
  logic [31:0] wdata = '0, rdata;
  logic cmd_on, cmd_off, cmd_reset, scope_rd_done;
  logic signed [23:0] i_ref;
  logic [4:0] user_out;
  logic setting_up;
  logic [15:0] kp, ki;
  logic [15:0] ilk_mask;
  logic [3:0] dac_sel [4];
  logic [3:0] scope_sel [4];
  scope_mode_e scope_mode;
  logic scope_falling;
  logic [1:0] scope_trig_ch;
  logic [7:0] scope_post;
  logic scope_enable;
  logic [15:0] scope_interval;
  logic signed [31:0] scope_level;
  logic pwm_slave;
  psu_state_e state = ST_ON;
  logic scope_ready = 1, scope_triggered = 0;
  logic [15:0] ilk_sync = 16'h1234, trip_cause = 16'h0020;
  logic signed [23:0] i_meas = -24'sd5;
  logic signed [15:0] m = 16'sd1234;
  logic [15:0] adc_aux [4];

  int checks = 0, failures = 0;

  register_bank dut (.*);

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
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr_reg(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk) begin addr = a; wdata = d; wr = 1; end
    @(negedge clk) wr = 0;
  endtask

  task automatic rd_reg(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk) begin addr = a; rd = 1; end
    @(negedge clk) begin rd = 0; d = rdata; end
  endtask

  logic [31:0] v;

  initial begin
    adc_aux = '{16'h1111, 16'h2222, 16'h3333, 16'h4444};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!setting_up, "Setting Up clear after reset");
    check(ilk_mask == 16'hFFFF, "all interlocks enabled after reset");
    // parameters
    wr_reg(RA_KP, 32'h0000_8001);
    wr_reg(RA_KI, 32'h0000_0123);
    wr_reg(RA_ILK_MASK, 32'h0000_7FFE);
    wr_reg(RA_MON_SEL, 32'h4321_FEDC);
    wr_reg(RA_SCOPE_CFG, 32'h0001_280F);
    wr_reg(RA_SCOPE_IVL, 32'h0000_0019);
    wr_reg(RA_SCOPE_LVL, 32'hFFFF_FF00);
    wr_reg(RA_PWM_CFG, 32'h1);
    check(!setting_up, "still not set up");
    wr_reg(RA_PARAM_DONE, 32'h1);
    check(setting_up, "Setting Up set by parameter-done");
    check(kp == 16'h8001 && ki == 16'h0123 && ilk_mask == 16'h7FFE, "gains and mask");
    check(dac_sel[0] == 4'hC && dac_sel[1] == 4'hD && dac_sel[2] == 4'hE && dac_sel[3] == 4'hF, "DAC selects");
    check(scope_sel[0] == 4'h1 && scope_sel[3] == 4'h4, "scope selects");
    check(scope_mode == SCOPE_TRIGGERED && scope_falling && scope_trig_ch == 2'd3, "scope mode fields");
    check(scope_post == 8'h28 && scope_enable && scope_interval == 16'h19, "scope count fields");
    check(scope_level == -32'sd256 && pwm_slave, "level and slave");
    rd_reg(RA_KP, v);        check(v == 32'h8001, "read kp");
    rd_reg(RA_MON_SEL, v);   check(v == 32'h4321_FEDC, "read selects");
    rd_reg(RA_SCOPE_LVL, v); check(v == 32'hFFFF_FF00, "read level");
    // a parameter change clears Setting Up
    wr_reg(RA_KI, 32'h0000_0124);
    check(!setting_up, "parameter write clears Setting Up");
    wr_reg(RA_PARAM_DONE, 32'h1);
    check(setting_up, "set again");
    // communication registers do not touch Setting Up
    wr_reg(RA_IREF, 32'h00FF_FFFE);
    check(setting_up && i_ref == -24'sd2, "current reference");
    wr_reg(RA_DOUT, 32'h15);
    check(user_out == 5'h15, "user outputs");
    // command pulses last one clock
    @(negedge clk) begin addr = RA_COMMAND; wdata = 32'h5; wr = 1; end
    @(negedge clk) begin
      wr = 0;
      check(cmd_on && !cmd_off && cmd_reset, "command pulse");
    end
    @(negedge clk) check(!cmd_on && !cmd_reset, "command pulse ends");
    @(negedge clk) begin addr = RA_SCOPE_CTRL; wdata = 32'h1; wr = 1; end
    @(negedge clk) begin wr = 0; check(scope_rd_done, "scope read-out done pulse"); end
    @(negedge clk) check(!scope_rd_done, "scope pulse ends");
    // monitored signals
    rd_reg(RA_STATUS, v);  check(v == 32'({1'b0, 1'b1, 1'b1, 2'd2}), $sformatf("status %h", v));
    rd_reg(RA_ILK_IN, v);  check(v == 32'h0020_1234, "interlock inputs");
    rd_reg(RA_IMEAS, v);   check(v == 32'hFFFF_FFFB, "measured current");
    rd_reg(RA_MOD, v);     check(v == 32'd1234, "modulation index");
    rd_reg(RA_AUX01, v);   check(v == 32'h2222_1111, "aux 0/1");
    rd_reg(RA_AUX23, v);   check(v == 32'h4444_3333, "aux 2/3");
    rd_reg(8'h7F, v);      check(v == 0, "unmapped reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
