// Self-checking testbench of pwm_generator at its default size (250 clocks per
// half period, four phases). For several modulation indices it records whole
// periods of the quarter-clock S0/S1 streams and checks, against values
// computed here from the modulation index alone:
//  - sync pulses every 250 clocks;
//  - leading signal high for 1000 + t1 quarters, lagging for 1000 - t1;
//  - edge positions T = floor((1000 - t1)/2) and T + t1 in both halves;
//  - S0 leads for m >= 0 and S1 for m < 0;
//  - each t1 is the floor or ceiling of |m|*1000/2**15 and the sum over the
//    recorded periods stays within one quarter clock of the exact sum (dither);
//  - a second instance in slave mode locks to the first one's sync pulse.
module tb_pwm_generator;
  import dpsc_pkg::*;

  localparam int HALF = 250;
  localparam int Q    = 4 * HALF;      // quarters per half period

  logic clk = 0, rst_n = 0, rst_s_n = 0;
  logic signed [15:0] m;
  logic [3:0] s0_ph, s1_ph, s0s_ph, s1s_ph;
  logic sync_out, sync_s;
  logic [10:0] t1_q, t1s_q;

  int checks = 0, failures = 0;

  pwm_generator dut (.clk, .rst_n, .m, .slave(1'b0), .sync_in(1'b0),
                     .s0_ph, .s1_ph, .sync_out, .t1_q);
  pwm_generator slv (.clk, .rst_n(rst_s_n), .m, .slave(1'b1), .sync_in(sync_out),
                     .s0_ph(s0s_ph), .s1_ph(s1s_ph), .sync_out(sync_s), .t1_q(t1s_q));

  always #10 clk = ~clk;   // 50 MHz

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

  // sync counting: even-numbered syncs start a period
  int sync_idx = 0;
  int last_sync_cycle = -1, cycle = 0;
  always @(posedge clk) begin
    cycle++;
    if (sync_out && rst_n) begin
      if (last_sync_cycle >= 0)
        check(cycle - last_sync_cycle == HALF, $sformatf("sync spacing %0d", cycle - last_sync_cycle));
      last_sync_cycle = cycle;
      sync_idx++;
    end
  end

  bit q0 [0:2*Q-1];
  bit q1 [0:2*Q-1];

  // Wait for the next period start, then record one period.
  task automatic record_period();
    int start_idx;
    // sync_idx counts a pulse at the posedge after it appears, so at the
    // negedge where a period-start pulse is visible it is still even.
    @(negedge clk);
    while (!(sync_out && (sync_idx % 2 == 0))) @(negedge clk);
    for (int c = 0; c < 2 * HALF; c++) begin
      for (int p = 0; p < 4; p++) begin
        q0[4*c+p] = s0_ph[p];
        q1[4*c+p] = s1_ph[p];
      end
      if (c != 2 * HALF - 1) @(negedge clk);
    end
  endtask

  function automatic int count_high(input bit s [0:2*Q-1]);
    int n = 0;
    for (int i = 0; i < 2 * Q; i++) n += s[i];
    return n;
  endfunction

  // first index >= from where the stream equals v (or 2*Q if none)
  function automatic int find(input bit s [0:2*Q-1], input int from, input bit v);
    for (int i = from; i < 2 * Q; i++) if (s[i] == v) return i;
    return 2 * Q;
  endfunction

  task automatic run_m(input int mv, input int periods);
    longint exact_num;       // |m| * 1000, in units of 2**-15 quarter
    longint sum_t1 = 0;
    int lo, hi;
    m = 16'(mv);
    // two periods for m to be taken
    record_period();
    record_period();
    exact_num = longint'(mv < 0 ? -mv : mv) * Q;
    lo = int'(exact_num >> 15);
    hi = (exact_num % 32768 == 0) ? lo : lo + 1;
    if (hi > Q) hi = Q;
    for (int k = 0; k < periods; k++) begin
      int hl, hg, t1, T;
      bit lead0;
      record_period();
      lead0 = (mv >= 0);
      hl = lead0 ? count_high(q0) : count_high(q1);
      hg = lead0 ? count_high(q1) : count_high(q0);
      t1 = hl - Q;
      check(t1 >= lo && t1 <= hi, $sformatf("m=%0d t1=%0d not in [%0d,%0d]", mv, t1, lo, hi));
      check(hl + hg == 2 * Q, $sformatf("m=%0d lead+lag=%0d", mv, hl + hg));
      T = (Q - t1) / 2;
      if (lead0) begin
        check(find(q0, 0, 1) == (t1 == Q ? 0 : T), $sformatf("m=%0d S0 rise %0d T=%0d", mv, find(q0, 0, 1), T));
        if (t1 < Q) begin
          check(find(q1, 0, 1) == T + t1, $sformatf("m=%0d S1 rise %0d", mv, find(q1, 0, 1)));
          check(find(q1, Q, 0) == Q + T, $sformatf("m=%0d S1 fall %0d", mv, find(q1, Q, 0)));
        end
        if (T > 0) check(find(q0, Q, 0) == Q + T + t1, $sformatf("m=%0d S0 fall %0d", mv, find(q0, Q, 0)));
      end else begin
        check(find(q1, 0, 1) == (t1 == Q ? 0 : T), $sformatf("m=%0d S1 rise %0d T=%0d", mv, find(q1, 0, 1), T));
        if (t1 < Q) begin
          check(find(q0, 0, 1) == T + t1, $sformatf("m=%0d S0 rise %0d", mv, find(q0, 0, 1)));
          check(find(q0, Q, 0) == Q + T, $sformatf("m=%0d S0 fall %0d", mv, find(q0, Q, 0)));
        end
      end
      sum_t1 += t1;
    end
    // error-feedback dither: cumulative error below one quarter clock
    begin
      longint err = sum_t1 * 32768 - longint'(periods) * exact_num;
      if (lo < Q) check(err > -32768 - 32768 && err < 32768 + 32768,
                        $sformatf("m=%0d dither sum %0d vs exact %0d/32768", mv, sum_t1, periods * exact_num));
    end
  endtask

  initial begin
    m = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (137) @(negedge clk);
    rst_s_n = 1;   // slave starts out of phase
    run_m(0, 2);
    run_m(16384, 3);        // m = 0.5 -> t1 = 500
    run_m(-16384, 3);
    run_m(1000, 8);         // t1 = 30.5 -> dithers between 30 and 31
    run_m(-7777, 8);        // t1 = 237.34...
    run_m(32767, 2);        // near full scale
    run_m(-32768, 2);       // full scale negative, saturates at t1 = 1000
    run_m(12345, 8);
    // slave: after many periods it must be locked to the master. With an
    // exact t1 (no dither residue) both instances must produce the same stream.
    run_m(8192, 3);
    // The sync train has a pulse every half period, so a slave may lock with
    // its period start on either pulse: its streams must equal the master's
    // either directly or delayed by one half period.
    begin
      logic [7:0] hist [0:2*HALF-1];
      int same = 0, shifted = 0;
      for (int i = 0; i < 4 * HALF; i++) begin
        @(negedge clk);
        check(sync_s == sync_out, "slave sync aligned");
        if (i >= HALF) begin
          if ({s0s_ph, s1s_ph} == {s0_ph, s1_ph}) same++;
          if ({s0s_ph, s1s_ph} == hist[(i - HALF) % (2 * HALF)]) shifted++;
        end
        hist[i % (2 * HALF)] = {s0_ph, s1_ph};
      end
      check(same == 3 * HALF || shifted == 3 * HALF,
            $sformatf("slave waveform locked: same=%0d shifted=%0d", same, shifted));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
