// Ring counter: the delay line of the delay-line DPWM part.
//
// W D flip-flops in a closed chain, clocked by Fclk, circulating a single 1.
// Reset loads the 1 into stage 0 (this design's choice); after k cycles it is
// in stage k mod W. All W stage outputs are brought out as taps for the
// multiplexers. The published design uses W = 2^ND = 32 stages. An
// assertion checks that exactly one stage holds the 1 outside reset.
module ring_counter #(
  parameter int unsigned W = 1 << mhdpwm_pkg::ND_DEFAULT
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] taps
);
  always_ff @(posedge clk) begin
    if (rst) taps <= W'(1);
    else     taps <= {taps[W-2:0], taps[W-1]};
  end

  a_one_hot: assert property (@(posedge clk) disable iff (rst)
                              taps != '0 && (taps & (taps - 1'b1)) == '0)
    else $error("ring counter lost its single 1: %h", taps);
endmodule
