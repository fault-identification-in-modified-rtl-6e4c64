// Rising-edge detector.
//
// Registers the input once and asserts `pulse` for the single cycle in which
// the input is high and was low one cycle earlier. The pulse is combinational
// from `sig`, so it appears in the same cycle as the edge. It starts the
// second counter of the counter-based part when SET_C rises. The edge sense
// and timing are this design's choice; the published design only names the
// block.
module edge_detector (
  input  logic clk,
  input  logic rst,
  input  logic sig,
  output logic pulse
);
  logic sig_q;

  always_ff @(posedge clk) begin
    if (rst) sig_q <= 1'b0;
    else     sig_q <= sig;
  end

  assign pulse = sig & ~sig_q;
endmodule
