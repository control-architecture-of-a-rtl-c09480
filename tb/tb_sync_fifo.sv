// Self-checking testbench of sync_fifo at 256 x 8: fills it to full, empties
// it, then runs random pushes and pops against a queue model here, checking
// data order, the show-ahead head, the count, and the full and empty flags.
module tb_sync_fifo;

  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [7:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [8:0] count;

  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_both = 0;
  logic [7:0] q [$];

  sync_fifo dut (.*);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  // one clock with the given requests; the model follows the same rules
  task automatic step(input bit p, input bit r, input logic [7:0] d);
    bit can_pop, can_push;
    @(negedge clk);
    can_pop  = r && q.size() > 0;
    can_push = p && (q.size() < 256 || can_pop);
    push = can_push; pop = can_pop; wr_data = d;
    if (q.size() > 0) check(rd_data == q[0], "head data");
    check(count == 9'(q.size()), $sformatf("count %0d vs %0d", count, q.size()));
    check(empty == (q.size() == 0), "empty flag");
    check(full == (q.size() == 256), "full flag");
    if (full) n_full++;
    if (empty) n_empty++;
    if (can_pop && can_push) n_both++;
    @(posedge clk);
    if (can_pop) void'(q.pop_front());
    if (can_push) q.push_back(d);
    #1 push = 0; pop = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) step(1, 0, 8'(i * 7 + 3));
    step(0, 0, 0);
    check(full, "full after 256 pushes");
    step(1, 1, 8'hA5);            // push and pop together when full
    for (int i = 0; i < 256; i++) step(0, 1, 0);
    step(0, 0, 0);
    check(empty, "empty after draining");
    for (int i = 0; i < 6000; i++) begin
      int bias = (i / 1000) % 2;  // alternate fill-heavy and drain-heavy phases
      step($urandom_range(0, 9) < (bias ? 7 : 3), $urandom_range(0, 9) < (bias ? 3 : 7), 8'($urandom));
    end
    check(n_full > 1 && n_empty > 1 && n_both > 10, "corner cases reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
