// Modified counter-based DPWM part (MCDPWM): the turn-off events.
//
// A free-running NC-bit period counter is compared with the duty field:
// equality gives SET_C. A zero detector on the same counter gives RESET1_C at
// the start of each period. The rising edge of SET_C restarts a second up
// counter, whose own comparator against the same duty field gives RESET2_C
// once, duty_c + 1 cycles after SET_C; the counter then stops. RESET_C is the
// OR of RESET1_C and RESET2_C.
//
// Timing: set_c and reset_c are combinational from registered counts and are
// consumed by the output SR flip-flop at the next Fclk edge.
//
// The counters, comparators, zero detector, edge detector and OR follow the
// published block diagram; comparison as equality, the edge sense and the
// start/stop behaviour of the second counter are this design's choices.
module mcdpwm #(
  parameter int unsigned NC = mhdpwm_pkg::NC_DEFAULT
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [NC-1:0] duty_c,
  output logic          set_c,
  output logic          reset_c
);
  logic          reset1_c, reset2_c;
  logic          start, match2, active2;
  logic [NC-1:0] count, count2;

  pwm_counter #(.NC(NC)) u_period_cnt (
    .clk(clk), .rst(rst), .count(count)
  );

  nbit_comparator #(.NC(NC)) u_set_cmp (
    .a(count), .b(duty_c), .eq(set_c)
  );

  zero_detector #(.NC(NC)) u_zero (
    .value(count), .zero(reset1_c)
  );

  edge_detector u_edge (
    .clk(clk), .rst(rst), .sig(set_c), .pulse(start)
  );

  triggered_counter #(.NC(NC)) u_second_cnt (
    .clk(clk), .rst(rst), .start(start), .done(match2),
    .count(count2), .active(active2)
  );

  nbit_comparator #(.NC(NC)) u_reset_cmp (
    .a(count2), .b(duty_c), .eq(match2)
  );

  assign reset2_c = match2 & active2;
  assign reset_c  = reset1_c | reset2_c;
endmodule
