// FPGA top level of the digital power supply controller.
//
// Signal path: the main 24-bit ADC reading of the magnet current enters the
// feedback regulator, which compares it with the current reference and
// computes the modulation index m; the PWM generator turns m into the gate
// signals S0 and S1 with quarter-clock resolution. The state machine lets the
// loop and the PWM outputs run only in the ON state, and trips on interlocks
// or when the parameters are being changed. All settings and monitored values
// live in the register bank, which the communication controller reaches over
// the register bus. Two signal selectors pick, out of 16 internal signals,
// the four shown on the monitor DACs and the four recorded by the virtual
// scope. The processor board reaches the communication controller through
// the processor board interface and its two FIFOs.
//
// Parts outside this module: the ADC and DAC converters and their serial
// links (samples enter and leave here as parallel words), the communication
// controller itself (an 8-bit soft processor; its register bus, scope read
// port and FIFO ports are brought out), the USB transceiver, the flash and
// DDR memories, the fast-feedback Ethernet and optical timing links, and the
// phase-shifted clocks that turn the per-quarter PWM levels into edges.
//
// Monitor signal numbers (select values of the DAC and scope selectors):
//   0 measured current   1 current reference   2 loop error    3 m
//   4 integrator >>> 16  5..8 auxiliary ADCs 0..3            9 state
//  10 interlock inputs  11 PWM t1 (quarter clocks)          12 trip cause
//  13 digital outputs   14 {S0 quarters, S1 quarters}       15 PWM sync
// This list, the gating of the PWM outputs by the ON state and the bus
// widths are this design's own choices.
module dpsc_top
  import dpsc_pkg::*;
(
  input  logic                         clk,          // 50 MHz reference clock
  input  logic                         rst_n,
  // converters
  input  logic signed [ADC_MAIN_W-1:0] adc_main,
  input  logic                         adc_main_valid,
  input  logic [ADC_AUX_W-1:0]         adc_aux [ADC_AUX_N],
  output logic [DAC_W-1:0]             dac [DAC_N],
  // isolated digital I/O
  input  logic [ILK_N-1:0]             ilk_in,
  output logic [DOUT_N-1:0]            dig_out,
  // PWM
  output logic [PWM_PHASES-1:0]        pwm_s0_ph,
  output logic [PWM_PHASES-1:0]        pwm_s1_ph,
  output logic                         pwm_sync_out,
  input  logic                         pwm_sync_in,
  // communication controller: register bus
  input  logic [REG_AW-1:0]            reg_addr,
  input  logic                         reg_wr,
  input  logic [REG_DW-1:0]            reg_wdata,
  input  logic                         reg_rd,
  output logic [REG_DW-1:0]            reg_rdata,
  // communication controller: virtual scope read-out
  input  logic [8:0]                   scope_rd_addr,
  output logic [MON_W-1:0]             scope_rd_data,
  output logic                         scope_ready,
  // communication controller: processor-board FIFOs
  input  logic                         pb_rx_pop,
  output logic [7:0]                   pb_rx_data,
  output logic                         pb_rx_empty,
  input  logic                         pb_tx_push,
  input  logic [7:0]                   pb_tx_data,
  output logic                         pb_tx_full,
  // processor board bus
  input  logic                         pb_cs_n,
  input  logic                         pb_we_n,
  input  logic                         pb_oe_n,
  input  logic [1:0]                   pb_addr,
  input  logic [7:0]                   pb_d_in,
  output logic [7:0]                   pb_d_out,
  output logic                         pb_d_oe,
  output logic                         pb_irq
);

  // ---- register bank ----------------------------------------------------
  logic cmd_on, cmd_off, cmd_reset, scope_rd_done, setting_up;
  logic signed [ADC_MAIN_W-1:0] i_ref;
  logic [DOUT_N-4:0] user_out;
  logic [15:0] kp, ki;
  logic [ILK_N-1:0] ilk_mask, ilk_sync, trip_cause;
  logic [3:0] dac_sel [DAC_N];
  logic [3:0] scope_sel [SCOPE_CH];
  scope_mode_e scope_mode;
  logic scope_falling, scope_enable, pwm_slave;
  logic [1:0] scope_trig_ch;
  logic [7:0] scope_post;
  logic [15:0] scope_interval;
  logic signed [31:0] scope_level;
  psu_state_e state;
  logic regulate;
  logic signed [MOD_W-1:0] m;
  logic m_valid;
  logic scope_triggered;
  logic signed [ADC_MAIN_W:0] err;
  logic signed [31:0] integ;

  register_bank u_regs (
    .clk, .rst_n,
    .addr(reg_addr), .wr(reg_wr), .wdata(reg_wdata), .rd(reg_rd), .rdata(reg_rdata),
    .cmd_on, .cmd_off, .cmd_reset, .scope_rd_done, .i_ref, .user_out,
    .setting_up, .kp, .ki, .ilk_mask, .dac_sel, .scope_sel,
    .scope_mode, .scope_falling, .scope_trig_ch, .scope_post, .scope_enable,
    .scope_interval, .scope_level, .pwm_slave,
    .state, .scope_ready, .scope_triggered, .ilk_sync, .trip_cause, .i_meas(adc_main), .m,
    .adc_aux
  );

  // ---- state machine ----------------------------------------------------
  psu_state_machine u_sm (
    .clk, .rst_n,
    .ilk_in, .ilk_mask, .setting_up, .cmd_on, .cmd_off, .cmd_reset, .user_out,
    .state, .regulate, .ilk_sync, .trip_cause, .dig_out
  );

  // ---- regulation loop --------------------------------------------------
  feedback_regulator u_reg (
    .clk, .rst_n,
    .enable(regulate), .i_meas(adc_main), .adc_valid(adc_main_valid),
    .i_ref, .kp, .ki, .m, .m_valid, .err, .integ_mon(integ)
  );

  logic [PWM_PHASES-1:0] s0_ph, s1_ph;
  logic [9:0]  t1_q;

  pwm_generator u_pwm (
    .clk, .rst_n,
    .m, .slave(pwm_slave), .sync_in(pwm_sync_in),
    .s0_ph, .s1_ph, .sync_out(pwm_sync_out), .t1_q
  );

  // gate signals only switch while the converter is on
  assign pwm_s0_ph = regulate ? s0_ph : '0;
  assign pwm_s1_ph = regulate ? s1_ph : '0;

  // ---- monitoring -------------------------------------------------------
  logic signed [MON_W-1:0] mon [MON_N];

  always_comb begin
    mon[0]  = MON_W'(adc_main);
    mon[1]  = MON_W'(i_ref);
    mon[2]  = MON_W'(err);
    mon[3]  = MON_W'(m);
    mon[4]  = integ >>> 16;
    for (int k = 0; k < int'(ADC_AUX_N); k++) mon[5 + k] = MON_W'(signed'(adc_aux[k]));
    mon[9]  = MON_W'(state);
    mon[10] = MON_W'(ilk_sync);
    mon[11] = MON_W'(t1_q);
    mon[12] = MON_W'(trip_cause);
    mon[13] = MON_W'(dig_out);
    mon[14] = MON_W'({pwm_s0_ph, pwm_s1_ph});
    mon[15] = MON_W'(pwm_sync_out);
  end

  signal_select #(.N_OUT(DAC_N), .OUT_W(DAC_W), .SHIFT(8), .OFFSET_BIN(1'b1)) u_dac_sel (
    .clk, .rst_n, .src(mon), .sel(dac_sel), .dout(dac)
  );

  logic [MON_W-1:0] scope_ch [SCOPE_CH];

  signal_select #(.N_OUT(SCOPE_CH), .OUT_W(MON_W), .SHIFT(0), .OFFSET_BIN(1'b0)) u_scope_sel (
    .clk, .rst_n, .src(mon), .sel(scope_sel), .dout(scope_ch)
  );

  logic scope_tick;

  virtual_scope u_scope (
    .clk, .rst_n,
    .enable(scope_enable), .mode(scope_mode), .interval(scope_interval),
    .trig_ch(scope_trig_ch), .trig_falling(scope_falling), .trig_level(scope_level),
    .post_count(scope_post), .ch_data(scope_ch),
    .rd_addr(scope_rd_addr), .rd_data(scope_rd_data), .rd_done(scope_rd_done),
    .ready(scope_ready), .triggered(scope_triggered), .sample_tick(scope_tick)
  );

  // ---- processor board --------------------------------------------------
  logic [8:0] pb_rx_count, pb_tx_count;

  processor_board_if u_pbi (
    .clk, .rst_n,
    .cs_n(pb_cs_n), .we_n(pb_we_n), .oe_n(pb_oe_n), .addr(pb_addr),
    .d_in(pb_d_in), .d_out(pb_d_out), .d_oe(pb_d_oe), .irq(pb_irq),
    .rx_pop(pb_rx_pop), .rx_data(pb_rx_data), .rx_empty(pb_rx_empty), .rx_count(pb_rx_count),
    .tx_push(pb_tx_push), .tx_data(pb_tx_data), .tx_full(pb_tx_full), .tx_count(pb_tx_count)
  );

endmodule
