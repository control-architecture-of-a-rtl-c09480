// Feedback regulator: proportional-integral current loop from the main
// 24-bit ADC reading to the PWM modulation index.
//
// For every ADC sample (adc_valid) the error e = i_ref - i_meas is formed,
// and the output is
//   m = sat16( (kp*e + I) >>> 16 ),   I <- clamp(I + ki*e)
// with kp and ki unsigned Q0.16 gains (65536 would be 1.0) and I clamped to
// the range that maps onto the full modulation range (+-2**31), which keeps
// the integrator from winding up. While `enable` is low (converter not on)
// the integrator is cleared and m is 0.
//
// Timing: two clocks from adc_valid to m_valid (error register, then
// multiply-accumulate and output register).
//
// The published description says only that the loop takes the digitised
// magnet current from the 24-bit ADC to the PWM output; its regulator was
// built in a model-based tool and is not published. The PI structure, the
// gain format and the widths here are this design's own, the simplest loop
// that does that job.
module feedback_regulator
  import dpsc_pkg::*;
#(
  parameter int unsigned IN_W   = ADC_MAIN_W,
  parameter int unsigned OUT_W  = MOD_W,
  parameter int unsigned GAIN_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  logic signed [IN_W-1:0]   i_meas,
  input  logic                     adc_valid,
  input  logic signed [IN_W-1:0]   i_ref,
  input  logic [GAIN_W-1:0]        kp,
  input  logic [GAIN_W-1:0]        ki,
  output logic signed [OUT_W-1:0]  m,
  output logic                     m_valid,
  output logic signed [IN_W:0]     err,        // last error, for monitoring
  output logic signed [31:0]       integ_mon   // integrator, for monitoring
);

  localparam int unsigned EW   = IN_W + 1;            // error width
  localparam int unsigned PWD  = EW + GAIN_W + 1;     // product width (signed)
  localparam int unsigned IW   = OUT_W + GAIN_W;      // integrator width
  localparam int unsigned SW   = PWD + 2;             // sum width

  logic              e_valid;
  logic signed [IW-1:0]  integ;
  logic signed [PWD-1:0] p_term, i_step;
  logic signed [SW-1:0]  i_sum, u_sum, u_shift;
  logic signed [IW-1:0]  i_next;
  logic signed [OUT_W-1:0] u_sat;

  localparam logic signed [SW-1:0] I_MAX = SW'((64'sd1 <<< (IW - 1)) - 1);
  localparam logic signed [SW-1:0] I_MIN = -SW'(64'sd1 <<< (IW - 1));
  localparam logic signed [SW-1:0] O_MAX = SW'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [SW-1:0] O_MIN = -SW'(64'sd1 <<< (OUT_W - 1));

  always_comb begin
    p_term = PWD'(err) * signed'({1'b0, kp});
    i_step = PWD'(err) * signed'({1'b0, ki});
    i_sum  = SW'(integ) + SW'(i_step);
    if (i_sum > I_MAX)      i_next = IW'(I_MAX);
    else if (i_sum < I_MIN) i_next = IW'(I_MIN);
    else                    i_next = IW'(i_sum);
    u_sum   = SW'(p_term) + SW'(i_next);
    u_shift = u_sum >>> GAIN_W;
    if (u_shift > O_MAX)      u_sat = OUT_W'(O_MAX);
    else if (u_shift < O_MIN) u_sat = OUT_W'(O_MIN);
    else                      u_sat = OUT_W'(u_shift);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err     <= '0;
      e_valid <= 1'b0;
      integ   <= '0;
      m       <= '0;
      m_valid <= 1'b0;
    end else begin
      e_valid <= adc_valid && enable;
      if (adc_valid) err <= EW'(i_ref) - EW'(i_meas);
      m_valid <= 1'b0;
      if (!enable) begin
        integ <= '0;
        m     <= '0;
      end else if (e_valid) begin
        integ   <= i_next;
        m       <= u_sat;
        m_valid <= 1'b1;
      end
    end
  end

  assign integ_mon = 32'(integ);

endmodule
