// Self-checking testbench of virtual_scope at its default size (4 channels,
// 128 samples, 32 bits). The channels carry functions of a free-running cycle
// counter (ch1 = the cycle count itself, ch0 = a triangle wave of it), so the
// read-back data tell when every sample was taken. Checked against values
// computed here: sample spacing equals the interval (at least 4 clocks),
// every channel of a sample belongs to the same instant, free-run captures
// repeat after rd_done, the capture time, and in triggered mode the sample
// at logical index 128-N is the first of two successive samples beyond the
// level with the right slope (rising and falling) and is preceded by 128-N
// older samples.
module tb_virtual_scope;
  import dpsc_pkg::*;

  localparam int DEPTH = 128;
  localparam int CH    = 4;

  logic clk = 0, rst_n = 0;
  logic enable = 0;
  scope_mode_e mode = SCOPE_FREE_RUN;
  logic [15:0] interval = 16'd5;
  logic [1:0]  trig_ch = 2'd0;
  logic        trig_falling = 1'b0;
  logic signed [31:0] trig_level = 32'sd50;
  logic [7:0]  post_count = 8'd40;
  logic [31:0] ch_data [CH];
  logic [8:0]  rd_addr = '0;
  logic [31:0] rd_data;
  logic        rd_done = 0, ready, triggered, sample_tick;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  virtual_scope dut (.*);

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int tri_wave(input int unsigned t);
    int p = int'(t % 200);
    return (p < 100) ? p : 200 - p;
  endfunction

  always_comb begin
    ch_data[0] = 32'(tri_wave(cyc));
    ch_data[1] = cyc;
    ch_data[2] = ~cyc;
    ch_data[3] = cyc * 3;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  int unsigned t_en;
  int unsigned t [DEPTH];
  int          v0 [DEPTH];

  // read the whole buffer and check channel consistency and spacing
  task automatic read_all(input int ivl);
    for (int s = 0; s < DEPTH; s++) begin
      for (int c = 0; c < CH; c++) begin
        @(negedge clk) rd_addr = 9'({s[6:0], c[1:0]});
        @(negedge clk);
        case (c)
          0: v0[s] = int'(rd_data);
          1: t[s]  = rd_data;
          2: check(rd_data == ~t[s], $sformatf("ch2 of sample %0d", s));
          3: check(rd_data == t[s] * 3, $sformatf("ch3 of sample %0d", s));
        endcase
      end
      check(v0[s] == tri_wave(t[s]), $sformatf("ch0 of sample %0d", s));
      if (s > 0) check(t[s] - t[s-1] == ivl, $sformatf("spacing %0d at sample %0d", t[s] - t[s-1], s));
    end
  endtask

  task automatic finish_read();
    @(negedge clk) rd_done = 1;
    @(negedge clk) rd_done = 0;
  endtask

  function automatic bit cond(input int a, input int b, input bit falling, input int lvl);
    if (!falling) return a > lvl && b > lvl && b > a;
    return a < lvl && b < lvl && b < a;
  endfunction

  task automatic triggered_run(input int ivl, input int n, input bit falling, input int lvl);
    int k;
    @(negedge clk);
    enable = 0; mode = SCOPE_TRIGGERED; interval = 16'(ivl);
    post_count = 8'(n); trig_falling = falling; trig_level = lvl;
    @(negedge clk) enable = 1;
    t_en = cyc;
    wait (ready);
    check(triggered, "triggered flag");
    read_all(ivl < CH ? CH : ivl);
    k = DEPTH - n;
    if (k > 0)
      check(cond(v0[k-1], v0[k], falling, lvl),
            $sformatf("trigger pair at %0d: %0d %0d (n=%0d)", k, v0[k-1], v0[k], n));
    // The trigger is the first qualifying pair once DEPTH-n samples have been
    // taken: no earlier pair in the buffer taken after that point qualifies.
    // Sample numbers since enable come from the recorded times.
    begin
      int ie = ivl < CH ? CH : ivl;
      if (k > 0) check((t[k] - t_en) / ie >= DEPTH - n, $sformatf("trigger sample number %0d", (t[k] - t_en) / ie));
      for (int j = 1; j < k; j++)
        if ((t[j] - t_en) / ie >= DEPTH - n)
          check(!cond(v0[j-1], v0[j], falling, lvl), $sformatf("earlier qualifying pair at %0d", j));
    end
    finish_read();
  endtask

  int unsigned t_start, t_prev_last;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- free run -------------------------------------------------------
    @(negedge clk);
    enable = 1;
    t_start = cyc;
    wait (ready);
    // 128 samples 5 clocks apart, plus the start and the last RAM writes
    check(cyc - t_start >= 127 * 5 && cyc - t_start <= 127 * 5 + 10,
          $sformatf("free-run capture took %0d clocks", cyc - t_start));
    read_all(5);
    t_prev_last = t[DEPTH-1];
    finish_read();
    wait (!ready);
    wait (ready);
    read_all(5);
    check(t[0] > t_prev_last, "free run repeats with new samples");
    finish_read();
    // an interval below the channel count acts as the channel count
    @(negedge clk) enable = 0; interval = 16'd2;
    @(negedge clk) enable = 1;
    wait (ready);
    read_all(CH);
    check(!triggered, "free run does not report a trigger");
    // ---- triggered ------------------------------------------------------
    triggered_run(7, 40, 1'b0, 50);
    triggered_run(3, 100, 1'b1, 60);
    triggered_run(9, 128, 1'b0, 20);
    triggered_run(6, 1, 1'b1, 30);
    triggered_run(5, 64, 1'b0, 70);
    triggered_run(4, 20, 1'b0, 10);
    triggered_run(13, 30, 1'b0, 45);
    triggered_run(11, 50, 1'b1, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
