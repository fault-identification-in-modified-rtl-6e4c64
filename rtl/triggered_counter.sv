// Start/stop up counter (the second counter of the counter-based part).
//
// A `start` pulse clears the count to 0 and makes the counter active; while
// active it counts up by one per Fclk cycle. A `done` input seen while active
// stops it after that cycle, so the comparator behind it fires once per start.
// `start` has priority over `done`. Synchronous active-high reset leaves it
// idle at 0. Outputs are registered. Counting up follows the published
// design; the stop on `done` is this design's choice.
module triggered_counter #(
  parameter int unsigned NC = mhdpwm_pkg::NC_DEFAULT
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          done,
  output logic [NC-1:0] count,
  output logic          active
);
  always_ff @(posedge clk) begin
    if (rst) begin
      count  <= '0;
      active <= 1'b0;
    end else if (start) begin
      count  <= '0;
      active <= 1'b1;
    end else if (active) begin
      count  <= count + 1'b1;
      if (done) active <= 1'b0;
    end
  end
endmodule
