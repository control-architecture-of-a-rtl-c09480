// Virtual scope: records 128 samples of each of four internal signals into a
// 512x32 block RAM for read-out by the communication controller.
//
// Sampling: a sample is taken every `interval` clocks (values below the
// channel count are treated as the channel count). The four channel values
// are latched at the sample instant and written into the RAM one channel per
// clock, at address {sample index, channel}, so the RAM needs a single write
// port.
//
// Free-run mode: DEPTH samples are taken, then `ready` is raised and the
// buffer holds still until the reader pulses `rd_done`; the cycle then
// repeats.
// Triggered mode: sampling runs continuously into the buffer as a ring until
// the trigger condition is met, then `post_count` (N) samples, the trigger
// sample included, are taken and `ready` is raised. The trigger fires when two
// successive samples of the selected channel both lie beyond the trigger
// level with the selected slope: for a rising slope both above the level and
// the second larger than the first, for a falling slope both below the level
// and the second smaller. A trigger is accepted only once DEPTH-N samples have
// been taken since the start, so that the whole buffer holds valid data.
//
// Read-out: rd_addr = {logical sample index, channel}; logical index 0 is the
// oldest sample of the capture. rd_data follows one clock after rd_addr.
//
// From the published description: the 512x32 RAM, 128 samples of four
// channels, the sample interval, both modes, N post-trigger samples and the
// two-sample slope trigger. The write sequencing, the ring-buffer pre-trigger
// history, the rd_done handshake and the logical read addressing are this
// design's own choices.
module virtual_scope
  import dpsc_pkg::*;
#(
  parameter int unsigned CH    = SCOPE_CH,
  parameter int unsigned DEPTH = SCOPE_DEPTH,
  parameter int unsigned DW    = MON_W,
  parameter int unsigned IVL_W = 16,
  localparam int unsigned SW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(CH),
  localparam int unsigned AW   = SW + CW,
  localparam int unsigned NW   = $clog2(DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  scope_mode_e          mode,
  input  logic [IVL_W-1:0]     interval,      // clocks between samples
  input  logic [CW-1:0]        trig_ch,
  input  logic                 trig_falling,  // 0: rising slope, 1: falling slope
  input  logic signed [DW-1:0] trig_level,
  input  logic [NW-1:0]        post_count,    // N, 1..DEPTH (0 and larger values act as DEPTH)
  input  logic [DW-1:0]        ch_data [CH],
  // read-out
  input  logic [AW-1:0]        rd_addr,
  output logic [DW-1:0]        rd_data,
  input  logic                 rd_done,       // pulse: read-out finished, start next capture
  output logic                 ready,         // capture complete, buffer holds still
  output logic                 triggered,     // triggered mode: trigger seen in this capture
  output logic                 sample_tick    // a sample is taken in this clock
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_POST, S_DONE} st_e;

  st_e                st;
  logic [IVL_W-1:0]   ivl_cnt;
  logic [SW-1:0]      wptr;          // next sample slot
  logic [NW-1:0]      taken;         // samples taken in this capture (saturating at DEPTH)
  logic [NW-1:0]      post_left;     // samples still to take after the trigger
  logic               have_prev;
  logic signed [DW-1:0] prev;

  logic [DW-1:0]      cap [CH];      // latched channel values
  logic               wr_busy;
  logic [CW-1:0]      wr_ch;
  logic [SW-1:0]      wr_slot;

  logic [DW-1:0]      mem [CH*DEPTH];

  logic [IVL_W-1:0]   ivl_eff;
  logic [NW-1:0]      n_eff;
  logic signed [DW-1:0] cur;
  logic               slope_ok, trig_hit;

  always_comb begin
    ivl_eff = (interval < IVL_W'(CH)) ? IVL_W'(CH) : interval;
    n_eff   = (post_count == '0 || post_count > NW'(DEPTH)) ? NW'(DEPTH) : post_count;
    sample_tick = (st == S_RUN || st == S_POST) && (ivl_cnt == '0);
    cur = signed'(ch_data[trig_ch]);
    if (!trig_falling) slope_ok = (prev > trig_level) && (cur > trig_level) && (cur > prev);
    else               slope_ok = (prev < trig_level) && (cur < trig_level) && (cur < prev);
    trig_hit = (mode == SCOPE_TRIGGERED) && (st == S_RUN) && sample_tick && have_prev &&
               slope_ok && (taken >= NW'(DEPTH) - n_eff);
  end

  // ---- Capture control --------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      ivl_cnt   <= '0;
      wptr      <= '0;
      taken     <= '0;
      post_left <= '0;
      have_prev <= 1'b0;
      prev      <= '0;
      triggered <= 1'b0;
    end else if (!enable) begin
      st <= S_IDLE;
    end else begin
      if (st == S_RUN || st == S_POST)
        ivl_cnt <= (ivl_cnt == '0) ? ivl_eff - 1'b1 : ivl_cnt - 1'b1;
      unique case (st)
        S_IDLE, S_DONE: begin
          if (st == S_IDLE || rd_done) begin
            st        <= S_RUN;
            ivl_cnt   <= '0;
            wptr      <= '0;
            taken     <= '0;
            have_prev <= 1'b0;
            triggered <= 1'b0;
          end
        end
        S_RUN: if (sample_tick) begin
          wptr      <= wptr + 1'b1;
          taken     <= (taken == NW'(DEPTH)) ? taken : taken + 1'b1;
          prev      <= cur;
          have_prev <= 1'b1;
          if (mode == SCOPE_FREE_RUN) begin
            if (taken >= NW'(DEPTH - 1)) st <= S_DONE;
          end else if (trig_hit) begin
            triggered <= 1'b1;
            post_left <= n_eff - 1'b1;
            if (n_eff == NW'(1)) st <= S_DONE;
            else                 st <= S_POST;
          end
        end
        S_POST: if (sample_tick) begin
          wptr      <= wptr + 1'b1;
          post_left <= post_left - 1'b1;
          if (post_left == NW'(1)) st <= S_DONE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ---- RAM write sequencing: one channel per clock ----------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_busy <= 1'b0;
      wr_ch   <= '0;
      wr_slot <= '0;
    end else if (sample_tick) begin
      wr_busy <= 1'b1;
      wr_ch   <= '0;
      wr_slot <= wptr;
    end else if (wr_busy) begin
      wr_ch <= wr_ch + 1'b1;
      if (wr_ch == CW'(CH - 1)) wr_busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (sample_tick) cap <= ch_data;
  end

  always_ff @(posedge clk) begin
    if (wr_busy) mem[{wr_slot, wr_ch}] <= cap[wr_ch];
  end

  // ---- Read port: logical index 0 = oldest sample -----------------------
  logic [SW-1:0] rd_slot;
  assign rd_slot = rd_addr[AW-1:CW] + wptr;   // wptr is the oldest slot once complete

  always_ff @(posedge clk) begin
    rd_data <= mem[{rd_slot, rd_addr[CW-1:0]}];
  end

  assign ready = (st == S_DONE) && !wr_busy;

endmodule
