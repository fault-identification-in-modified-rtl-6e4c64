// Modified hybrid DPWM generator (one of the three redundant copies).
//
// The (NC+ND)-bit duty word is split: the upper NC bits go to the
// counter-based part (MCDPWM, which removes turn-off delay) and the lower ND
// bits to the delay-line part (MDDPWM, which removes turn-on delay).
// SET = SET_C | SET_D and RESET = RESET_C | RESET_D drive a clocked SR
// flip-flop whose output is the PWM; pwm_n is its complement.
//
// Timing: every output changes one Fclk cycle after the SET/RESET event that
// causes it. After reset all counters start at 0 together, so the waveform
// repeats every 2^max(NC,ND) cycles. Reset is synchronous and active high.
//
// The structure follows the published design; the field split order, reset,
// and the SR flip-flop's reset-wins rule are this design's choices.
module mhdpwm #(
  parameter int unsigned NC = mhdpwm_pkg::NC_DEFAULT,
  parameter int unsigned ND = mhdpwm_pkg::ND_DEFAULT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NC+ND-1:0] duty,
  output logic             pwm,
  output logic             pwm_n
);
  logic          set_c, reset_c, set_d, reset_d;

  mcdpwm #(.NC(NC)) u_mcdpwm (
    .clk(clk), .rst(rst), .duty_c(duty[NC+ND-1:ND]),
    .set_c(set_c), .reset_c(reset_c)
  );

  mddpwm #(.ND(ND)) u_mddpwm (
    .clk(clk), .rst(rst), .duty_d(duty[ND-1:0]),
    .set_d(set_d), .reset_d(reset_d)
  );

  sr_ff u_sr (
    .clk(clk), .rst(rst),
    .s(set_c | set_d), .r(reset_c | reset_d),
    .q(pwm), .q_n(pwm_n)
  );
endmodule
