// Processor board interface: connects the asynchronous bus of the embedded
// processor board to the controller through a receive and a transmit FIFO.
//
// Processor side: an 8-bit data bus with chip select, write and read strobes
// (all active low) and two address lines, plus an interrupt line. The bus has
// no clock: the strobes, the address and the data pass a two-flop
// synchroniser, and an access is acted on when the synchronised strobe ends.
//   address 0, write : byte into the receive FIFO (processor -> FPGA)
//   address 0, read  : head byte of the transmit FIFO; it is removed when the
//                      read strobe ends
//   address 1, read  : status {4'b0, rx_full, rx_empty, tx_full, tx_not_empty}
// The read data are driven straight from the FIFO head and the status, so
// they are valid while the read strobe is low; d_oe tells the pad when to
// drive the bus. irq is high while the transmit FIFO holds data.
// A strobe must stay low for at least three clocks and high for at least
// three clocks between accesses.
//
// Controller side: the receive FIFO is read and the transmit FIFO written by
// the communication controller through the same kind of byte-FIFO ports a
// USB transceiver offers, so one protocol serves both links.
//
// From the published description: an asynchronous interface, receive and
// transmit FIFOs of 256 x 8 each with the same data interface as the USB
// link, and a processor connection of data bus, chip select, a few address
// lines and interrupts. The register map, the strobe handling and the timing
// rule are this design's own choices.
module processor_board_if #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  // processor bus (asynchronous)
  input  logic         cs_n,
  input  logic         we_n,
  input  logic         oe_n,
  input  logic [1:0]   addr,
  input  logic [W-1:0] d_in,
  output logic [W-1:0] d_out,
  output logic         d_oe,
  output logic         irq,
  // controller side
  input  logic         rx_pop,
  output logic [W-1:0] rx_data,
  output logic         rx_empty,
  output logic [AW:0]  rx_count,
  input  logic         tx_push,
  input  logic [W-1:0] tx_data,
  output logic         tx_full,
  output logic [AW:0]  tx_count
);

  // ---- synchroniser -------------------------------------------------------
  logic [1:0]   wr_s, rd_s;        // [0] first stage, [1] second stage
  logic         wr_d, rd_d;        // second stage delayed: edge detection
  logic [1:0]   addr_m, addr_s;
  logic [W-1:0] data_m, data_s;
  logic         wr_end, rd_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_s   <= '0;
      rd_s   <= '0;
      wr_d   <= 1'b0;
      rd_d   <= 1'b0;
      addr_m <= '0;
      addr_s <= '0;
      data_m <= '0;
      data_s <= '0;
    end else begin
      wr_s   <= {wr_s[0], !cs_n && !we_n};
      rd_s   <= {rd_s[0], !cs_n && !oe_n};
      wr_d   <= wr_s[1];
      rd_d   <= rd_s[1];
      addr_m <= addr;
      data_m <= d_in;
      // keep the address and data seen during the strobe
      if (wr_s[1] || rd_s[1]) begin
        addr_s <= addr_m;
        data_s <= data_m;
      end
    end
  end

  assign wr_end = wr_d && !wr_s[1];
  assign rd_end = rd_d && !rd_s[1];

  // ---- FIFOs --------------------------------------------------------------
  logic         rx_full, tx_empty;
  logic [W-1:0] tx_head;

  sync_fifo #(.DEPTH(DEPTH), .W(W)) u_rx (
    .clk, .rst_n,
    .push(wr_end && addr_s == 2'd0 && !rx_full), .wr_data(data_s),
    .pop(rx_pop), .rd_data(rx_data),
    .empty(rx_empty), .full(rx_full), .count(rx_count)
  );

  sync_fifo #(.DEPTH(DEPTH), .W(W)) u_tx (
    .clk, .rst_n,
    .push(tx_push), .wr_data(tx_data),
    .pop(rd_end && addr_s == 2'd0 && !tx_empty), .rd_data(tx_head),
    .empty(tx_empty), .full(tx_full), .count(tx_count)
  );

  // ---- processor read path ------------------------------------------------
  always_comb begin
    unique case (addr)
      2'd0:    d_out = tx_head;
      2'd1:    d_out = W'({rx_full, rx_empty, tx_full, !tx_empty});
      default: d_out = '0;
    endcase
  end
  assign d_oe = !cs_n && !oe_n;
  assign irq  = !tx_empty;

endmodule
