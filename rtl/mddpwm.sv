// Modified delay-line DPWM part (MDDPWM): the turn-on events.
//
// Two ring counters of 2^ND flip-flops each circulate a single 1 at Fclk. A
// multiplexer on the first ring, selected by the duty field, gives RESET_D in
// the cycle the 1 passes stage duty_d. A multiplexer on the second ring,
// selected by 1 - duty (2^ND - duty_d modulo 2^ND), gives SET1_D.
//
// The published design also ORs Fclk itself into SET_D (its SET2_D term). The
// output SR flip-flop samples on the rising Fclk edge, where Fclk is always
// high, so a data term would hold SET permanently. Here the Fclk contribution
// is the clock edge of that flip-flop, and SET_D equals SET1_D; this is this
// design's reading.
//
// Timing: set_d and reset_d are combinational from ring-counter flip-flops.
// Reset puts both rings at stage 0, in step with the period counter of the
// counter-based part, so stage k is active when the period count is k mod
// 2^ND.
module mddpwm #(
  parameter int unsigned ND = mhdpwm_pkg::ND_DEFAULT
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [ND-1:0] duty_d,
  output logic          set_d,
  output logic          reset_d
);
  localparam int unsigned W = 1 << ND;

  logic [W-1:0]  taps_reset, taps_set;
  logic [ND-1:0] duty_inv;

  // "1 - duty" in ND-bit arithmetic
  assign duty_inv = ND'(0) - duty_d;

  ring_counter #(.W(W)) u_ring_reset (
    .clk(clk), .rst(rst), .taps(taps_reset)
  );

  ring_counter #(.W(W)) u_ring_set (
    .clk(clk), .rst(rst), .taps(taps_set)
  );

  delay_line_mux #(.ND(ND)) u_mux_reset (
    .taps(taps_reset), .sel(duty_d), .y(reset_d)
  );

  delay_line_mux #(.ND(ND)) u_mux_set (
    .taps(taps_set), .sel(duty_inv), .y(set_d)
  );
endmodule
