// PWM generator: two centre-aligned gate signals S0 and S1 with quarter-clock
// edge resolution.
//
// A counter runs over one PWM period of 2*HALF_CLKS clocks (500 clocks, i.e.
// 100 kHz at the 50 MHz reference clock) and emits a sync pulse at the start
// of each half period, every HALF_CLKS clocks. The modulation index m
// (signed, 1.0 = 2**(MOD_W-1)) sets the pulse-length difference t1, counted
// in quarter clocks: t1 = |m| * 4*HALF_CLKS. With T = floor((4*HALF_CLKS - t1)/2)
// and positions counted in quarter clocks from the last sync pulse:
//   first half : the leading signal rises at T, the lagging one at T + t1
//   second half: the lagging signal falls at T, the leading one at T + t1
// so the leading signal is high for half a period plus t1 and the lagging one
// for half a period minus t1, both centred on the mid-period sync pulse.
// For m >= 0 S0 leads, for m < 0 S1 leads. This follows the labelled
// intervals T, T+eps and t1 of the published timing diagram and the equations
// t1 = no_clks + ph_clk/4 and T = (250 - t1)/2; the leftover quarter clock
// (eps) falls into the interval before the next sync pulse.
//
// Sub-clock resolution: the product |m| * 4*HALF_CLKS keeps MOD_W-1 fraction
// bits. A first-order error-feedback loop (the "recursive" dither) adds the
// fraction to an accumulator once per period and rounds t1 up in the
// periods where the accumulator overflows, so the average of t1 equals the
// exact demand. The outputs s0_ph/s1_ph give the level of each signal in the
// four quarters of the current clock (bit 0 = first quarter, phase 0 deg);
// an output stage clocked by the four phase-shifted copies of the clock
// (a clock-manager resource of the FPGA, not part of this module) turns them
// into edges with 5 ns resolution at 50 MHz.
//
// Master/slave: in slave mode (slave = 1) a sync_in pulse realigns the
// counter to the nearest half-period boundary, so a slave follows the
// sync_out of a master card. That alignment rule is this design's choice.
//
// Timing: m is sampled once per period at the period start; outputs are
// registered, sync_out is high for one clock in the same cycle as the
// quarter pattern of the first clock of each half period.
module pwm_generator
  import dpsc_pkg::*;
#(
  parameter int unsigned HALF_CLKS = PWM_HALF_CLKS,
  parameter int unsigned PHASES    = PWM_PHASES,
  parameter int unsigned M_W       = MOD_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [M_W-1:0] m,          // modulation index
  input  logic                 slave,       // 1: follow sync_in
  input  logic                 sync_in,     // sync pulse from a master card
  output logic [PHASES-1:0]    s0_ph,       // S0 level per quarter clock
  output logic [PHASES-1:0]    s1_ph,       // S1 level per quarter clock
  output logic                 sync_out,    // PWM sync pulse
  output logic [$clog2(PHASES*HALF_CLKS+1)-1:0] t1_q  // t1 in use, quarter clocks
);

  localparam int unsigned PERIOD = 2 * HALF_CLKS;
  localparam int unsigned STEPS  = PHASES * HALF_CLKS;        // quarter clocks per half period
  localparam int unsigned CW     = $clog2(PERIOD);
  localparam int unsigned QW     = $clog2(STEPS + 1) + 1;     // position / t1 width
  localparam int unsigned FW     = M_W - 1;                   // fraction bits
  localparam int unsigned PW     = M_W + $clog2(STEPS + 1);   // product width

  logic [CW-1:0]  cnt, cnt_next;
  logic           period_start;
  logic [QW-1:0]  t1_r;          // t1 of the current period
  logic           lead_s0;       // 1: S0 leads (m >= 0)
  logic [FW-1:0]  acc;           // dither accumulator

  // ---- Period counter with optional slave alignment ---------------------
  always_comb begin
    if (cnt == CW'(PERIOD - 1)) cnt_next = '0;
    else                        cnt_next = cnt + 1'b1;
    // A master's sync_out is seen when its counter already stands at 1 or
    // HALF_CLKS+1; step to the count that follows that one.
    if (slave && sync_in) begin
      if (cnt >= CW'(HALF_CLKS / 2 + 1) && cnt < CW'(HALF_CLKS + HALF_CLKS / 2 + 1))
        cnt_next = CW'(HALF_CLKS + 2);
      else
        cnt_next = CW'(2);
    end
  end

  // New period values are taken whenever the counter enters the first half
  // other than by counting on within it (the wrap, or a slave realignment).
  assign period_start = (cnt_next < CW'(HALF_CLKS)) &&
                        !((cnt < CW'(HALF_CLKS)) && (cnt_next == cnt + 1'b1));

  // ---- t1 from |m| with error-feedback dither ---------------------------
  logic [M_W-1:0]  m_abs;
  logic [PW-1:0]   prod;
  logic [FW:0]     acc_sum;
  logic [QW-1:0]   t1_raw, t1_new;

  always_comb begin
    m_abs   = m[M_W-1] ? M_W'(-m) : M_W'(m);   // -2**(M_W-1) gives 2**(M_W-1)
    prod    = PW'(m_abs) * PW'(STEPS);
    acc_sum = {1'b0, acc} + {1'b0, prod[FW-1:0]};
    t1_raw  = QW'(prod >> FW) + QW'(acc_sum[FW]);
    t1_new  = (t1_raw > QW'(STEPS)) ? QW'(STEPS) : t1_raw;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      t1_r    <= '0;
      lead_s0 <= 1'b1;
      acc     <= '0;
    end else begin
      cnt <= cnt_next;
      if (period_start) begin
        t1_r    <= t1_new;
        lead_s0 <= !m[M_W-1];
        acc     <= acc_sum[FW-1:0];
      end
    end
  end

  // ---- Edge placement in quarter clocks ---------------------------------
  logic          second_half;
  logic [CW-1:0] c_in_half;
  logic [QW-1:0] t_edge;        // T
  logic [QW-1:0] t_edge2;       // T + t1
  logic [PHASES-1:0] lead_ph, lag_ph;

  always_comb begin
    second_half = (cnt >= CW'(HALF_CLKS));
    c_in_half   = second_half ? cnt - CW'(HALF_CLKS) : cnt;
    t_edge      = (QW'(STEPS) - t1_r) >> 1;
    t_edge2     = t_edge + t1_r;
    for (int p = 0; p < int'(PHASES); p++) begin
      logic [QW-1:0] pos;
      pos = QW'(c_in_half) * QW'(PHASES) + QW'(p);
      if (!second_half) begin
        lead_ph[p] = (pos >= t_edge);
        lag_ph[p]  = (pos >= t_edge2);
      end else begin
        lead_ph[p] = (pos < t_edge2);
        lag_ph[p]  = (pos < t_edge);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_ph    <= '0;
      s1_ph    <= '0;
      sync_out <= 1'b0;
    end else begin
      s0_ph    <= lead_s0 ? lead_ph : lag_ph;
      s1_ph    <= lead_s0 ? lag_ph  : lead_ph;
      sync_out <= (c_in_half == '0);
    end
  end

  assign t1_q = ($bits(t1_q))'(t1_r);

endmodule
