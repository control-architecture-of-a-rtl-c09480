// First-word-fall-through FIFO, DEPTH x W (256 x 8 by default), one clock.
//
// The head entry is always visible on rd_data while `empty` is low; `pop`
// removes it, `push` appends wr_data. Both may happen in the same clock, also
// when the FIFO is full (the pop makes room) or empty (then only the push
// takes effect). A push into a full FIFO or a pop from an empty one is
// ignored and is flagged by an assertion. count gives the fill level.
//
// The 256 x 8 size is the published one for the processor-board FIFOs; the
// show-ahead organisation is this design's choice (it lets an asynchronous
// processor read see the data as soon as it drives its read strobe).
module sync_fifo #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] wr_data,
  input  logic         pop,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic [AW:0]  count
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_pop)  rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wr_data;
  end

  assign rd_data = mem[rptr];

  no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("sync_fifo: push into a full FIFO");
  no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("sync_fifo: pop from an empty FIFO");

endmodule
