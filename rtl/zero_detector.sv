// Zero value detector.
//
// Asserts while the period counter is at 0, marking the start of every PWM
// period; this is the RESET1_C event of the counter-based part.
// Purely combinational (a NOR over all bits).
module zero_detector #(
  parameter int unsigned NC = mhdpwm_pkg::NC_DEFAULT
) (
  input  logic [NC-1:0] value,
  output logic          zero
);
  assign zero = ~|value;
endmodule
