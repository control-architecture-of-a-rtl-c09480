// Self-checking testbench of signal_select with the DAC settings (16 sources,
// four 16-bit outputs, shift by 8, offset binary) and the scope settings
// (32-bit outputs, no shift). Random sources and selects; every output is
// compared with the selected source, scaled here, one clock later.
module tb_signal_select;

  logic clk = 0, rst_n = 0;
  logic signed [31:0] src [16];
  logic [3:0] sel [4];
  logic [15:0] dac [4];
  logic [31:0] scp [4];

  int checks = 0, failures = 0;

  signal_select #(.N_OUT(4), .OUT_W(16), .SHIFT(8), .OFFSET_BIN(1'b1)) dut_dac (
    .clk, .rst_n, .src, .sel, .dout(dac));
  signal_select #(.N_OUT(4), .OUT_W(32), .SHIFT(0), .OFFSET_BIN(1'b0)) dut_scope (
    .clk, .rst_n, .src, .sel, .dout(scp));

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
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

  initial begin
    for (int i = 0; i < 16; i++) src[i] = '0;
    for (int k = 0; k < 4; k++) sel[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      logic signed [31:0] exp_src [4];
      @(negedge clk);
      for (int i = 0; i < 16; i++) src[i] = (n % 5 == 0) ? -32'(i * 4096 + 7) : 32'($urandom);
      for (int k = 0; k < 4; k++) begin
        sel[k] = 4'($urandom);
        exp_src[k] = src[sel[k]];
      end
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        logic [31:0] d;
        d = 32'(exp_src[k]) >> 8;          // bits 23:8 of the source
        check(dac[k] == (d[15:0] ^ 16'h8000), $sformatf("dac %0d", k));
        check(scp[k] == exp_src[k], $sformatf("scope %0d", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
