// End-to-end testbench of dpsc_top, the whole controller at its default size.
//
// A first-order model of the power converter and magnet closes the loop: in
// every half PWM period the voltage is taken as the difference of the S0 and
// S1 on-times in that half (+-1 at full modulation), the current moves an
// eighth of the way towards VGAIN * voltage, and is sampled by the main ADC
// at every PWM sync pulse. The testbench plays the communication controller
// (register bus, scope read port, FIFO ports) and the processor board (its
// asynchronous bus).
//
// Sequence: the converter is tripped after reset; parameters are loaded and
// Setting Up is set; reset and on commands; the loop settles to a positive
// and then a negative reference within 1 %; the triggered scope captures the
// step response; an interlock and a parameter change each trip the
// converter and stop the gate signals; the free-running scope repeats; bytes
// travel both ways through the processor-board FIFOs; the PWM locks to an
// external sync pulse in slave mode. Each of these mechanisms is counted and
// a failure is recorded for any that never happened.
module tb_dpsc_top;
  import dpsc_pkg::*;

  localparam real VGAIN = 4.0e6;    // ADC counts of current at full modulation

  logic clk = 0, rst_n = 0;
  logic signed [23:0] adc_main = '0;
  logic adc_main_valid = 0;
  logic [15:0] adc_aux [4];
  logic [15:0] dac [4];
  logic [15:0] ilk_in = '0;
  logic [7:0]  dig_out;
  logic [3:0]  pwm_s0_ph, pwm_s1_ph;
  logic        pwm_sync_out, pwm_sync_in = 0;
  logic [7:0]  reg_addr = '0;
  logic        reg_wr = 0, reg_rd = 0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic [8:0]  scope_rd_addr = '0;
  logic [31:0] scope_rd_data;
  logic        scope_ready;
  logic        pb_rx_pop = 0, pb_rx_empty, pb_tx_push = 0, pb_tx_full;
  logic [7:0]  pb_rx_data, pb_tx_data = '0;
  logic        pb_cs_n = 1, pb_we_n = 1, pb_oe_n = 1;
  logic [1:0]  pb_addr = '0;
  logic [7:0]  pb_d_in = '0, pb_d_out;
  logic        pb_d_oe, pb_irq;

  dpsc_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
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

  // ---- mechanism counters -----------------------------------------------
  int n_reg_pos = 0, n_reg_neg = 0, n_s1_leads = 0, n_dither = 0;
  int n_trip_ilk = 0, n_trip_param = 0, n_scope_trig = 0, n_scope_free = 0;
  int n_fifo_rx = 0, n_fifo_tx = 0, n_slave_lock = 0, n_dac = 0;

  // ---- converter and magnet model ---------------------------------------
  real i_mag = 0.0;
  int  h0 = 0, h1 = 0;
  always @(posedge clk) begin
    h0 += $countones(pwm_s0_ph);
    h1 += $countones(pwm_s1_ph);
    adc_main_valid <= 1'b0;
    if (pwm_sync_out) begin
      real v;
      v = real'(h0 - h1) / 1000.0;
      i_mag = i_mag + (VGAIN * v - i_mag) / 8.0;
      if (h1 > h0) n_s1_leads++;
      h0 = 0; h1 = 0;
      adc_main       <= 24'($rtoi(i_mag));
      adc_main_valid <= 1'b1;
    end
  end

  // dither: a period whose t1 was rounded up by the error-feedback carry
  always @(posedge clk)
    if (dut.u_pwm.period_start && dut.u_pwm.acc_sum[15] && dut.regulate) n_dither++;

  // ---- register bus ---------------------------------------------------------
  task automatic wr_reg(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk) begin reg_addr = a; reg_wdata = d; reg_wr = 1; end
    @(negedge clk) reg_wr = 0;
  endtask

  task automatic rd_reg(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk) begin reg_addr = a; reg_rd = 1; end
    @(negedge clk) begin reg_rd = 0; d = reg_rdata; end
  endtask

  task automatic expect_state(input psu_state_e st, input string what);
    logic [31:0] v;
    rd_reg(RA_STATUS, v);
    check(psu_state_e'(v[1:0]) == st, $sformatf("%s: state %0d", what, v[1:0]));
  endtask

  task automatic load_params(input logic [31:0] scope_cfg, input logic [31:0] ivl,
                             input logic [31:0] lvl);
    wr_reg(RA_KP, 32'd2000);
    wr_reg(RA_KI, 32'd300);
    wr_reg(RA_ILK_MASK, 32'h0000_00FF);
    // DAC 0..3: measured current, reference, error, m; scope 0..3: same
    wr_reg(RA_MON_SEL, 32'h3210_3210);
    wr_reg(RA_SCOPE_CFG, scope_cfg);
    wr_reg(RA_SCOPE_IVL, ivl);
    wr_reg(RA_SCOPE_LVL, lvl);
    wr_reg(RA_PWM_CFG, 32'h0);
    wr_reg(RA_PARAM_DONE, 32'h1);
  endtask

  task automatic run_half_periods(input int n);
    repeat (n) begin
      @(posedge clk);
      while (!pwm_sync_out) @(posedge clk);
    end
  endtask

  // settle to a reference and check the final error
  task automatic settle(input int iref, output bit ok);
    wr_reg(RA_IREF, 32'(iref));
    run_half_periods(400);
    ok = (i_mag > iref - 0.01 * (iref < 0 ? -iref : iref)) && (i_mag < iref + 0.01 * (iref < 0 ? -iref : iref));
    check(ok, $sformatf("loop settled at %0f for reference %0d", i_mag, iref));
  endtask

  // gate signals off while not ON
  task automatic check_gates_off(input string what);
    int on = 0;
    repeat (600) begin
      @(negedge clk);
      on += $countones({pwm_s0_ph, pwm_s1_ph});
    end
    check(on == 0, $sformatf("%s: gates off", what));
  endtask

  // ---- processor board bus ------------------------------------------------
  task automatic pb_write(input logic [1:0] a, input logic [7:0] d);
    #7 pb_addr = a; pb_d_in = d; pb_cs_n = 0;
    #5 pb_we_n = 0;
    #100 pb_we_n = 1;
    #5 pb_cs_n = 1;
    #80;
  endtask

  task automatic pb_read(input logic [1:0] a, output logic [7:0] d);
    #7 pb_addr = a; pb_cs_n = 0;
    #5 pb_oe_n = 0;
    #90 d = pb_d_out;
    #10 pb_oe_n = 1;
    #5 pb_cs_n = 1;
    #80;
  endtask

  // ---- scope read-out -----------------------------------------------------
  logic signed [31:0] sc [128][4];
  task automatic read_scope();
    for (int s = 0; s < 128; s++)
      for (int c = 0; c < 4; c++) begin
        @(negedge clk) scope_rd_addr = 9'({s[6:0], c[1:0]});
        @(negedge clk) sc[s][c] = scope_rd_data;
      end
    wr_reg(RA_SCOPE_CTRL, 32'h1);
  endtask

  // slave sync source: a pulse every 250 clocks at its own phase
  int sync_div = 0;
  bit sync_gen_on = 0;
  always @(posedge clk) begin
    if (sync_gen_on) begin
      sync_div    <= (sync_div == 249) ? 0 : sync_div + 1;
      pwm_sync_in <= (sync_div == 100);
    end else begin
      pwm_sync_in <= 1'b0;
    end
  end

  logic [31:0] v;
  logic [7:0]  b;
  bit ok;

  initial begin
    for (int k = 0; k < 4; k++) adc_aux[k] = 16'(1000 * (k + 1));
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- tripped after reset, parameters, reset, on ---------------------
    expect_state(ST_TRIPPED, "after reset");
    check(dig_out[1], "tripped output after reset");
    // triggered scope on the measured current, rising through 500000,
    // 64 samples after the trigger, one sample every 100 clocks
    load_params(32'h0001_4001, 32'd100, 32'd500000);
    rd_reg(RA_STATUS, v);
    check(v[2], "Setting Up set after loading");
    wr_reg(RA_COMMAND, 32'h4);           // reset
    expect_state(ST_OFF, "after reset command");
    wr_reg(RA_COMMAND, 32'h1);           // on
    expect_state(ST_ON, "after on command");
    check(dig_out[0], "converter enable output");
    // ---- positive reference ------------------------------------------------
    settle(1_000_000, ok);
    if (ok) n_reg_pos++;
    rd_reg(RA_IMEAS, v);
    check(v == 32'(adc_main), "measured current register");
    // DAC 0 shows bits 23:8 of the measured current, offset binary
    @(negedge clk);
    @(negedge clk);
    check(dac[0] == (adc_main[23:8] ^ 16'h8000), $sformatf("DAC0 %h", dac[0]));
    check(dac[1] == (24'(1_000_000) >> 8 ^ 16'h8000), "DAC1 shows the reference");
    if (dac[0] == (adc_main[23:8] ^ 16'h8000)) n_dac++;
    // ---- triggered scope capture of the step response ----------------------
    rd_reg(RA_STATUS, v);
    check(v[3] && v[4], $sformatf("scope ready and triggered, status %h", v));
    if (v[3] && v[4]) begin
      read_scope();
      check(sc[63][0] > 500000 && sc[64][0] > 500000 && sc[64][0] > sc[63][0],
            $sformatf("trigger pair %0d %0d", sc[63][0], sc[64][0]));
      check(sc[0][0] < 500000, "pre-trigger history below the level");
      check(sc[64][1] == 1_000_000, "scope channel 1 records the reference");
      if (sc[64][0] > 500000 && sc[63][0] > 500000) n_scope_trig++;
    end
    // ---- negative reference ------------------------------------------------
    begin
      int s1_before = n_s1_leads;
      settle(-500_000, ok);
      if (ok) n_reg_neg++;
      check(n_s1_leads > s1_before + 100, "S1 leads for a negative voltage");
    end
    // ---- interlock trip ----------------------------------------------------
    @(negedge clk) ilk_in[3] = 1;
    repeat (4) @(negedge clk);
    expect_state(ST_TRIPPED, "interlock 3");
    check(dig_out[1] && !dig_out[0], "tripped outputs");
    rd_reg(RA_ILK_IN, v);
    check(v[31:16] == 16'h0008, $sformatf("trip cause %h", v[31:16]));
    if (v[31:16] == 16'h0008) n_trip_ilk++;
    check_gates_off("interlock trip");
    // a masked input does not matter
    @(negedge clk) begin ilk_in[3] = 0; ilk_in[12] = 1; end
    repeat (4) @(negedge clk);
    wr_reg(RA_COMMAND, 32'h4);
    wr_reg(RA_COMMAND, 32'h1);
    expect_state(ST_ON, "on with masked input active");
    settle(800_000, ok);
    // ---- parameter change trip, free-running scope -------------------------
    wr_reg(RA_SCOPE_CFG, 32'h0001_8000);  // free run
    wr_reg(RA_SCOPE_CTRL, 32'h1);         // discard a capture still held
    expect_state(ST_TRIPPED, "parameter change");
    rd_reg(RA_STATUS, v);
    if (!v[2]) n_trip_param++;
    check(!v[2], "Setting Up cleared by parameter change");
    check_gates_off("parameter change");
    wr_reg(RA_PARAM_DONE, 32'h1);
    wr_reg(RA_COMMAND, 32'h4);
    wr_reg(RA_COMMAND, 32'h1);
    expect_state(ST_ON, "on after parameter change");
    begin
      int got = 0;
      for (int cap = 0; cap < 2; cap++) begin
        int w = 0;
        do begin rd_reg(RA_STATUS, v); w++; end while (!v[3] && w < 20000);
        check(v[3] && !v[4], $sformatf("free-run capture %0d ready, not triggered: status %h", cap, v));
        read_scope();
        check(sc[10][1] == 800_000, $sformatf("free-run capture %0d holds the reference: %0d", cap, sc[10][1]));
        got++;
      end
      n_scope_free = got;
    end
    // ---- processor board FIFOs ----------------------------------------------
    for (int i = 0; i < 8; i++) pb_write(2'd0, 8'(8'h40 + i));
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      check(!pb_rx_empty && pb_rx_data == 8'(8'h40 + i), "byte from the processor board");
      if (pb_rx_data == 8'(8'h40 + i)) n_fifo_rx++;
      pb_rx_pop = 1;
      @(negedge clk) pb_rx_pop = 0;
    end
    for (int i = 0; i < 5; i++) begin
      @(negedge clk) begin pb_tx_push = 1; pb_tx_data = 8'(8'hA0 + i); end
    end
    @(negedge clk) pb_tx_push = 0;
    @(negedge clk) check(pb_irq, "interrupt to the processor board");
    for (int i = 0; i < 5; i++) begin
      pb_read(2'd0, b);
      check(b == 8'(8'hA0 + i), "byte to the processor board");
      if (b == 8'(8'hA0 + i)) n_fifo_tx++;
    end
    check(!pb_irq, "interrupt cleared");
    // ---- PWM slave mode -----------------------------------------------------
    sync_gen_on = 1;
    wr_reg(RA_PWM_CFG, 32'h1);
    wr_reg(RA_PARAM_DONE, 32'h1);
    wr_reg(RA_COMMAND, 32'h4);
    wr_reg(RA_COMMAND, 32'h1);
    run_half_periods(10);
    begin
      int match = 0;
      repeat (1000) begin
        @(negedge clk);
        if (pwm_sync_in && pwm_sync_out) match++;
        check(pwm_sync_in == pwm_sync_out, "slave sync follows the sync input");
      end
      n_slave_lock = match;
    end
    settle(300_000, ok);
    // ---- mechanism coverage -------------------------------------------------
    $display("mechanisms: reg+ %0d reg- %0d S1-leads %0d dither %0d ilk-trip %0d param-trip %0d",
             n_reg_pos, n_reg_neg, n_s1_leads, n_dither, n_trip_ilk, n_trip_param);
    $display("            scope-trig %0d scope-free %0d fifo-rx %0d fifo-tx %0d slave %0d dac %0d",
             n_scope_trig, n_scope_free, n_fifo_rx, n_fifo_tx, n_slave_lock, n_dac);
    check(n_reg_pos > 0, "positive regulation happened");
    check(n_reg_neg > 0, "negative regulation happened");
    check(n_s1_leads > 0, "S1 leading happened");
    check(n_dither > 0, "dither carry happened");
    check(n_trip_ilk > 0, "interlock trip happened");
    check(n_trip_param > 0, "parameter-change trip happened");
    check(n_scope_trig > 0, "scope trigger happened");
    check(n_scope_free > 1, "free-run scope repeated");
    check(n_fifo_rx > 0 && n_fifo_tx > 0, "FIFO transfers happened");
    check(n_slave_lock > 0, "slave lock happened");
    check(n_dac > 0, "DAC monitor happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
