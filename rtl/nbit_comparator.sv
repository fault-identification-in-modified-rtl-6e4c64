// N-bit equality comparator.
//
// Flags the cycle in which a count "overlaps" (equals) the duty field. Used
// for SET_C against the period counter and for RESET2_C against the second
// counter. Purely combinational.
module nbit_comparator #(
  parameter int unsigned NC = mhdpwm_pkg::NC_DEFAULT
) (
  input  logic [NC-1:0] a,
  input  logic [NC-1:0] b,
  output logic          eq
);
  assign eq = (a == b);
endmodule
