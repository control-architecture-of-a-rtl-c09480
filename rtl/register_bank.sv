// Register space of the controller, seen by the communication controller over
// a simple word-wide register bus.
//
// Three kinds of register, after the parameter spaces of the controller:
//  - communication registers (operator settings): the command register,
//    whose bits are one-clock pulses (on, off, reset, scope read-out done),
//    the current reference and the user digital outputs;
//  - parameter registers (loaded from non-volatile memory at power-up, and
//    changed from the service PC): regulator gains, interlock mask, signal
//    selects, scope set-up, PWM master/slave. Writing any of them clears the
//    Setting Up bit, which trips the converter; writing RA_PARAM_DONE sets it
//    again once the new set is complete. Setting Up is clear after reset, so
//    the converter stays tripped until the parameters have been loaded;
//  - monitored signals, read only: state, interlocks, measured current,
//    modulation index, auxiliary ADC readings.
//
// Bus timing: a write takes effect at the clock edge where `wr` is high; read
// data appear on rdata one clock after a clock with `rd` high. Addresses are
// listed in dpsc_pkg.
//
// From the published description: the three register kinds, parameters
// loaded at power-up, and the Setting Up bit cleared by a parameter change
// (forcing the PC Tripped state) and set when new parameters are loaded. The
// address map, the widths and the bus are this design's own choices.
module register_bank
  import dpsc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // register bus
  input  logic [REG_AW-1:0]      addr,
  input  logic                   wr,
  input  logic [REG_DW-1:0]      wdata,
  input  logic                   rd,
  output logic [REG_DW-1:0]      rdata,
  // communication registers
  output logic                   cmd_on,
  output logic                   cmd_off,
  output logic                   cmd_reset,
  output logic                   scope_rd_done,
  output logic signed [ADC_MAIN_W-1:0] i_ref,
  output logic [DOUT_N-4:0]      user_out,
  // parameter registers
  output logic                   setting_up,
  output logic [15:0]            kp,
  output logic [15:0]            ki,
  output logic [ILK_N-1:0]       ilk_mask,
  output logic [3:0]             dac_sel   [DAC_N],
  output logic [3:0]             scope_sel [SCOPE_CH],
  output scope_mode_e            scope_mode,
  output logic                   scope_falling,
  output logic [1:0]             scope_trig_ch,
  output logic [7:0]             scope_post,
  output logic                   scope_enable,
  output logic [15:0]            scope_interval,
  output logic signed [31:0]     scope_level,
  output logic                   pwm_slave,
  // monitored signals
  input  psu_state_e             state,
  input  logic                   scope_ready,
  input  logic                   scope_triggered,
  input  logic [ILK_N-1:0]       ilk_sync,
  input  logic [ILK_N-1:0]       trip_cause,
  input  logic signed [ADC_MAIN_W-1:0] i_meas,
  input  logic signed [MOD_W-1:0] m,
  input  logic [ADC_AUX_W-1:0]   adc_aux [ADC_AUX_N]
);

  logic [31:0] mon_sel_r, scope_cfg_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_on         <= 1'b0;
      cmd_off        <= 1'b0;
      cmd_reset      <= 1'b0;
      scope_rd_done  <= 1'b0;
      i_ref          <= '0;
      user_out       <= '0;
      setting_up     <= 1'b0;
      kp             <= '0;
      ki             <= '0;
      ilk_mask       <= '1;
      mon_sel_r      <= '0;
      scope_cfg_r    <= '0;
      scope_interval <= 16'd4;
      scope_level    <= '0;
      pwm_slave      <= 1'b0;
    end else begin
      cmd_on        <= 1'b0;
      cmd_off       <= 1'b0;
      cmd_reset     <= 1'b0;
      scope_rd_done <= 1'b0;
      if (wr) begin
        // any parameter register write clears Setting Up
        if (addr >= RA_KP && addr < RA_PARAM_DONE) setting_up <= 1'b0;
        unique case (addr)
          RA_COMMAND: begin
            cmd_on    <= wdata[0];
            cmd_off   <= wdata[1];
            cmd_reset <= wdata[2];
          end
          RA_IREF:       i_ref          <= wdata[ADC_MAIN_W-1:0];
          RA_SCOPE_CTRL: scope_rd_done  <= wdata[0];
          RA_DOUT:       user_out       <= wdata[DOUT_N-4:0];
          RA_KP:         kp             <= wdata[15:0];
          RA_KI:         ki             <= wdata[15:0];
          RA_ILK_MASK:   ilk_mask       <= wdata[ILK_N-1:0];
          RA_MON_SEL:    mon_sel_r      <= wdata;
          RA_SCOPE_CFG:  scope_cfg_r    <= wdata;
          RA_SCOPE_IVL:  scope_interval <= wdata[15:0];
          RA_SCOPE_LVL:  scope_level    <= wdata;
          RA_PWM_CFG:    pwm_slave      <= wdata[0];
          RA_PARAM_DONE: setting_up     <= 1'b1;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    for (int k = 0; k < int'(DAC_N); k++)    dac_sel[k]   = mon_sel_r[4*k +: 4];
    for (int k = 0; k < int'(SCOPE_CH); k++) scope_sel[k] = mon_sel_r[16 + 4*k +: 4];
  end
  assign scope_mode    = scope_mode_e'(scope_cfg_r[0]);
  assign scope_falling = scope_cfg_r[1];
  assign scope_trig_ch = scope_cfg_r[3:2];
  assign scope_post    = scope_cfg_r[15:8];
  assign scope_enable  = scope_cfg_r[16];

  // ---- read-back --------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata <= '0;
    end else if (rd) begin
      unique case (addr)
        RA_IREF:       rdata <= 32'(i_ref);
        RA_DOUT:       rdata <= 32'(user_out);
        RA_KP:         rdata <= 32'(kp);
        RA_KI:         rdata <= 32'(ki);
        RA_ILK_MASK:   rdata <= 32'(ilk_mask);
        RA_MON_SEL:    rdata <= mon_sel_r;
        RA_SCOPE_CFG:  rdata <= scope_cfg_r;
        RA_SCOPE_IVL:  rdata <= 32'(scope_interval);
        RA_SCOPE_LVL:  rdata <= scope_level;
        RA_PWM_CFG:    rdata <= 32'(pwm_slave);
        RA_STATUS:     rdata <= 32'({scope_triggered, scope_ready, setting_up, state});
        RA_ILK_IN:     rdata <= {trip_cause, ilk_sync};
        RA_IMEAS:      rdata <= 32'(i_meas);
        RA_MOD:        rdata <= 32'(m);
        RA_AUX01:      rdata <= {adc_aux[1], adc_aux[0]};
        RA_AUX23:      rdata <= {adc_aux[3], adc_aux[2]};
        default:       rdata <= '0;
      endcase
    end
  end

endmodule
