// Signal selector: routes N_OUT of N_SRC internal signals to outputs, each
// output with its own 4-bit select.
//
// Used twice in the controller: for the four monitor DACs, each showing one of
// 16 user-selectable signals of the feedback process, and for the four
// channels of the virtual scope. Output k shows source sel[k], arithmetically
// shifted right by SHIFT and cut to OUT_W bits (for the DACs this picks the
// 16 most significant bits of a 24-bit quantity). When OFFSET_BIN is set the
// sign bit is inverted, giving the offset-binary code many DACs expect.
// Outputs are registered: one clock from a source or select change.
//
// The 16 signals and the 4 DAC channels are from the published description;
// which signals are offered, the scaling and the DAC code are this design's
// own choices.
module signal_select
  import dpsc_pkg::*;
#(
  parameter int unsigned N_SRC      = MON_N,
  parameter int unsigned N_OUT      = DAC_N,
  parameter int unsigned IN_W       = MON_W,
  parameter int unsigned OUT_W      = DAC_W,
  parameter int unsigned SHIFT      = 8,
  parameter bit          OFFSET_BIN = 1'b1,
  localparam int unsigned SEL_W     = $clog2(N_SRC)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] src [N_SRC],
  input  logic [SEL_W-1:0]       sel [N_OUT],
  output logic [OUT_W-1:0]       dout [N_OUT]
);

  logic [OUT_W-1:0] nxt [N_OUT];

  always_comb begin
    for (int k = 0; k < int'(N_OUT); k++)
      nxt[k] = OUT_W'(src[sel[k]] >>> SHIFT) ^ (OFFSET_BIN ? (OUT_W'(1) << (OUT_W - 1)) : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(N_OUT); k++) dout[k] <= '0;
    end else begin
      dout <= nxt;
    end
  end

endmodule
