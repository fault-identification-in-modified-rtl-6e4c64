// Free-running period counter of the counter-based DPWM part.
//
// An NC-bit up counter clocked by Fclk that wraps from 2^NC-1 to 0, so one PWM
// period lasts 2^NC cycles. Synchronous active-high reset clears it to 0
// (reset is this design's choice). The count is a registered output.
module pwm_counter #(
  parameter int unsigned NC = mhdpwm_pkg::NC_DEFAULT
) (
  input  logic          clk,
  input  logic          rst,
  output logic [NC-1:0] count
);
  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end
endmodule
