// Delay-line multiplexer: 2^ND:1 selection of one ring-counter tap.
//
// The duty field (or its complement) is the select, so the output is high in
// the one cycle per ring revolution in which the circulating 1 sits at the
// selected stage. Purely combinational.
module delay_line_mux #(
  parameter int unsigned ND = mhdpwm_pkg::ND_DEFAULT
) (
  input  logic [(1<<ND)-1:0] taps,
  input  logic [ND-1:0]      sel,
  output logic               y
);
  assign y = taps[sel];
endmodule
