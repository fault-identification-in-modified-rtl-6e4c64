// Three-input majority voter of the TMR structure.
//
// `valid` is the value held by at least two of the three generator outputs,
// so a single faulty generator is masked. `err` is high whenever the three
// inputs are not all equal, flagging that one generator has gone wrong.
// Purely combinational. The majority rule follows the published design; the
// rule for `err` is this design's reading of its "error in output" signal.
module majority_voter (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic valid,
  output logic err
);
  assign valid = (a & b) | (a & c) | (b & c);
  assign err   = (a ^ b) | (a ^ c);
endmodule
