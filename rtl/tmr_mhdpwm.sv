// Triple-modular-redundant MHDPWM: fault identification by majority voting.
//
// Three identical modified hybrid DPWM generators run from the same clock,
// each with its own duty input (normally all three carry the same word). A
// combinational 2-of-3 majority voter produces the fault-free PWM `mhdpwm`,
// which stays correct while at most one generator is wrong, and raises
// `error` in every cycle in which the three generator outputs differ. The raw
// generator outputs are brought out on channel_pwm so the odd one out can be
// identified.
//
// Timing: `mhdpwm` and `error` follow the generator flip-flops
// combinationally, i.e. one Fclk cycle after the SET/RESET events.
// Reset is synchronous and active high and is this design's addition.
module tmr_mhdpwm #(
  parameter int unsigned NC = mhdpwm_pkg::NC_DEFAULT,
  parameter int unsigned ND = mhdpwm_pkg::ND_DEFAULT
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic [NC+ND-1:0]                    duty1,
  input  logic [NC+ND-1:0]                    duty2,
  input  logic [NC+ND-1:0]                    duty3,
  output logic                                mhdpwm,
  output logic                                error,
  output logic [mhdpwm_pkg::TMR_WAYS-1:0]     channel_pwm
);
  logic [NC+ND-1:0] duty [mhdpwm_pkg::TMR_WAYS];
  logic [mhdpwm_pkg::TMR_WAYS-1:0] pwm_n_unused;

  assign duty[0] = duty1;
  assign duty[1] = duty2;
  assign duty[2] = duty3;

  for (genvar i = 0; i < mhdpwm_pkg::TMR_WAYS; i++) begin : g_gen
    mhdpwm #(.NC(NC), .ND(ND)) u_gen (
      .clk(clk), .rst(rst), .duty(duty[i]),
      .pwm(channel_pwm[i]), .pwm_n(pwm_n_unused[i])
    );
  end

  majority_voter u_voter (
    .a(channel_pwm[0]), .b(channel_pwm[1]), .c(channel_pwm[2]),
    .valid(mhdpwm), .err(error)
  );
endmodule
