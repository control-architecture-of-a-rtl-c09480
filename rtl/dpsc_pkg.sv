// Shared types and constants of the PSU controller FPGA design.
//
// The controller regulates a switch-mode magnet power supply: a 24-bit ADC
// reading of the output current is compared with a reference, a regulator
// computes a modulation index, and a PWM generator turns that index into two
// gate signals S0/S1. A state machine gates the regulation on interlocks and
// operator commands, a register space connects everything to the
// communication controller, and a virtual scope records four internal
// signals.
//
// Numbers that come from the published description: 50 MHz reference clock,
// four clock phases (5 ns resolution), PWM sync every 250 clocks, 16 interlock
// inputs, 8 digital outputs, 16 selectable monitor signals, 4 monitor DACs,
// a 512x32 scope RAM holding 128 samples of 4 channels, 256x8 FIFOs.
// Everything else here (encodings, register addresses, widths of the
// regulator) is this design's own choice.
package dpsc_pkg;

  // ---- PWM --------------------------------------------------------------
  localparam int unsigned CLK_HZ          = 50_000_000;
  localparam int unsigned PWM_HALF_CLKS   = 250;   // clocks between PWM sync pulses
  localparam int unsigned PWM_PHASES      = 4;     // 0, 90, 180, 270 degree clock phases
  localparam int unsigned MOD_W           = 16;    // signed modulation index, 1.0 = 2**15

  // ---- Signals and interfaces -------------------------------------------
  localparam int unsigned ADC_MAIN_W      = 24;    // main-loop ADC
  localparam int unsigned ADC_AUX_W       = 16;    // four auxiliary ADCs
  localparam int unsigned ADC_AUX_N       = 4;
  localparam int unsigned DAC_W           = 16;
  localparam int unsigned DAC_N           = 4;
  localparam int unsigned MON_N           = 16;    // user-selectable monitor signals
  localparam int unsigned MON_W           = 32;    // width of one monitor signal
  localparam int unsigned ILK_N           = 16;    // isolated digital inputs
  localparam int unsigned DOUT_N          = 8;     // isolated digital outputs

  // ---- Virtual scope ----------------------------------------------------
  localparam int unsigned SCOPE_CH        = 4;
  localparam int unsigned SCOPE_DEPTH     = 128;

  // ---- Register bus -----------------------------------------------------
  localparam int unsigned REG_AW          = 8;
  localparam int unsigned REG_DW          = 32;

  // PSU state machine states
  typedef enum logic [1:0] {
    ST_TRIPPED = 2'd0,   // "PC Tripped": converter shut down, waits for reset
    ST_OFF     = 2'd1,   // ready, converter off
    ST_ON      = 2'd2    // converter on, loop regulating
  } psu_state_e;

  // Virtual scope modes
  typedef enum logic {
    SCOPE_FREE_RUN  = 1'b0,
    SCOPE_TRIGGERED = 1'b1
  } scope_mode_e;

  // Register addresses (word addresses on the register bus)
  // Communication registers
  localparam logic [REG_AW-1:0] RA_COMMAND     = 8'h00; // W: bit0 on, bit1 off, bit2 reset (pulses)
  localparam logic [REG_AW-1:0] RA_IREF        = 8'h01; // RW: current reference, signed 24-bit
  localparam logic [REG_AW-1:0] RA_SCOPE_CTRL  = 8'h02; // W: bit0 readout done (pulse)
  localparam logic [REG_AW-1:0] RA_DOUT        = 8'h03; // RW: user digital outputs [4:0]
  // Parameter registers (writing one clears the Setting Up bit)
  localparam logic [REG_AW-1:0] RA_KP          = 8'h10;
  localparam logic [REG_AW-1:0] RA_KI          = 8'h11;
  localparam logic [REG_AW-1:0] RA_ILK_MASK    = 8'h12;
  localparam logic [REG_AW-1:0] RA_MON_SEL     = 8'h13; // 4 x 4-bit DAC selects, 4 x 4-bit scope selects
  localparam logic [REG_AW-1:0] RA_SCOPE_CFG   = 8'h14; // [0] mode [1] slope falling [3:2] trig ch [15:8] post count [16] enable
  localparam logic [REG_AW-1:0] RA_SCOPE_IVL   = 8'h15; // sample interval in clocks
  localparam logic [REG_AW-1:0] RA_SCOPE_LVL   = 8'h16; // trigger level, signed 32-bit
  localparam logic [REG_AW-1:0] RA_PWM_CFG     = 8'h17; // [0] slave mode
  localparam logic [REG_AW-1:0] RA_PARAM_DONE  = 8'h1F; // W: sets the Setting Up bit
  // Monitored signals (read only)
  localparam logic [REG_AW-1:0] RA_STATUS      = 8'h20; // [1:0] state [2] setting up [3] scope ready [4] scope triggered
  localparam logic [REG_AW-1:0] RA_ILK_IN      = 8'h21; // [15:0] inputs [31:16] latched trip cause
  localparam logic [REG_AW-1:0] RA_IMEAS       = 8'h22;
  localparam logic [REG_AW-1:0] RA_MOD         = 8'h23;
  localparam logic [REG_AW-1:0] RA_AUX01       = 8'h24;
  localparam logic [REG_AW-1:0] RA_AUX23       = 8'h25;

endpackage
