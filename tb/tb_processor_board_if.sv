// Self-checking testbench of processor_board_if with 256-byte FIFOs. A bus
// model here plays the processor: asynchronous write and read cycles with
// strobes held for several clocks and set-up times not aligned to the clock.
// Checked: bytes written by the processor arrive in order in the receive
// FIFO, bytes pushed by the controller are read back in order, the status
// byte, the interrupt, d_oe, and filling the receive FIFO to full (further
// writes are dropped).
module tb_processor_board_if;

  logic clk = 0, rst_n = 0;
  logic cs_n = 1, we_n = 1, oe_n = 1;
  logic [1:0] addr = '0;
  logic [7:0] d_in = '0, d_out;
  logic d_oe, irq;
  logic rx_pop = 0, rx_empty, tx_push = 0, tx_full;
  logic [7:0] rx_data, tx_data = '0;
  logic [8:0] rx_count, tx_count;

  int checks = 0, failures = 0;

  processor_board_if dut (.*);

  always #10 clk = ~clk;

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

  // processor write cycle: 100 ns strobe, 80 ns between cycles
  task automatic pb_write(input logic [1:0] a, input logic [7:0] d);
    #7 addr = a; d_in = d; cs_n = 0;
    #5 we_n = 0;
    #100 we_n = 1;
    #5 cs_n = 1;
    #80;
  endtask

  task automatic pb_read(input logic [1:0] a, output logic [7:0] d);
    #7 addr = a; cs_n = 0;
    #5 oe_n = 0;
    #90 d = d_out;
    check(d_oe, "d_oe during read");
    #10 oe_n = 1;
    #5 cs_n = 1;
    #80;
    check(!d_oe, "d_oe released");
  endtask

  logic [7:0] d, st;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    pb_read(2'd1, st);
    check(st == 8'b0000_0100, $sformatf("status after reset %b", st));
    check(!irq, "no interrupt when nothing to send");
    // processor -> controller
    for (int i = 0; i < 20; i++) pb_write(2'd0, 8'(i * 13 + 1));
    check(rx_count == 20, $sformatf("rx count %0d", rx_count));
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      check(!rx_empty && rx_data == 8'(i * 13 + 1), $sformatf("rx byte %0d = %h", i, rx_data));
      rx_pop = 1;
      @(negedge clk) rx_pop = 0;
    end
    check(rx_empty, "rx empty after reading");
    // controller -> processor
    for (int i = 0; i < 30; i++) begin
      @(negedge clk) begin tx_push = 1; tx_data = 8'(255 - 3 * i); end
    end
    @(negedge clk) tx_push = 0;
    @(negedge clk);
    check(irq, "interrupt while transmit data wait");
    pb_read(2'd1, st);
    check(st[0] && !st[1], $sformatf("status with tx data %b", st));
    for (int i = 0; i < 30; i++) begin
      pb_read(2'd0, d);
      check(d == 8'(255 - 3 * i), $sformatf("tx byte %0d = %h", i, d));
    end
    check(!irq && tx_count == 0, "interrupt cleared after last byte");
    // fill the receive FIFO: 256 accepted, the rest dropped
    for (int i = 0; i < 260; i++) pb_write(2'd0, 8'(i));
    check(rx_count == 256, $sformatf("rx count at full %0d", rx_count));
    pb_read(2'd1, st);
    check(st[3] && !st[2], $sformatf("status rx full %b", st));
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      check(rx_data == 8'(i), "rx order after fill");
      rx_pop = 1;
      @(negedge clk) rx_pop = 0;
    end
    // writes to address 1 do not enter the FIFO
    pb_write(2'd1, 8'h55);
    check(rx_empty, "write to status address ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
