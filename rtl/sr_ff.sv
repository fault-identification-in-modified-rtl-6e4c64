// Clocked SR flip-flop driving the PWM output.
//
// On each rising Fclk edge: RESET clears q, otherwise SET sets q, otherwise q
// holds. When SET and RESET coincide, RESET wins, so a pulse always ends on a
// reset event (the published design does not say; this is this design's
// choice). q_n is the complement, as in the published waveforms. Synchronous
// active-high rst clears q. One cycle from s/r to q.
module sr_ff (
  input  logic clk,
  input  logic rst,
  input  logic s,
  input  logic r,
  output logic q,
  output logic q_n
);
  always_ff @(posedge clk) begin
    if (rst)    q <= 1'b0;
    else if (r) q <= 1'b0;
    else if (s) q <= 1'b1;
  end

  assign q_n = ~q;
endmodule
