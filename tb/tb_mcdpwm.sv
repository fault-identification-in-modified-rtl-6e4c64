// Testbench for mcdpwm: every 5-bit duty value, several periods each.
// Expected events are worked out in closed form from the cycle t since reset
// (the period count is t mod 32):
//   SET_C   when t mod 32 == d
//   RESET_C when t mod 32 == 0, or t >= 2d+1 and (t - (2d+1)) mod 32 == 0
// (the second counter starts at t = d, is 0 at d+1 and reaches d at 2d+1).
module tb_mcdpwm;
  localparam int NC = 5;
  localparam int M  = 1 << NC;
  logic clk = 0, rst = 1;
  logic [NC-1:0] duty_c = 0;
  logic set_c, reset_c;
  int checks = 0, failures = 0, reset2_seen = 0;

  mcdpwm #(.NC(NC)) dut (
    .clk(clk), .rst(rst), .duty_c(duty_c), .set_c(set_c), .reset_c(reset_c)
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < M; d++) begin
      @(negedge clk);
      rst = 1;
      duty_c = NC'(d);
      @(negedge clk);
      rst = 0;
      for (int t = 0; t < 4 * M; t++) begin
        bit e_set, e_rst, e_rst2;
        e_set  = (t % M == d);
        e_rst2 = (t >= 2 * d + 1) && ((t - (2 * d + 1)) % M == 0);
        e_rst  = (t % M == 0) || e_rst2;
        checks++;
        if (set_c !== e_set || reset_c !== e_rst) begin
          failures++;
          $display("FAIL d=%0d t=%0d set_c=%0b/%0b reset_c=%0b/%0b",
                   d, t, set_c, e_set, reset_c, e_rst);
        end
        if (e_rst2 && t % M != 0) reset2_seen++;
        @(negedge clk);
      end
    end
    checks++; if (reset2_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
