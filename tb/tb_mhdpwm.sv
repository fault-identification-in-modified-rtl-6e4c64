// Testbench for mhdpwm.
// Part 1: the two duty words of the published waveform, checked against
// hand-derived high times. For 01010_10101 (upper 10, lower 21) the set
// events fall at period counts 10 and 11 and the resets at 0 and 21, so the
// output is high 11 of every 32 cycles. For 01010_11111 (upper 10, lower 31)
// sets fall at 1 and 10 and resets at 0, 21 and 31: high 20 of 32 cycles.
// Part 2: every cycle compared with the reference model for a sweep of duty
// words, including changes of the word without a reset.
module tb_mhdpwm;
  import mhdpwm_ref_pkg::*;
  localparam int NC = 5;
  localparam int ND = 5;
  localparam int M  = 1 << NC;
  logic clk = 0, rst = 1;
  logic [NC+ND-1:0] duty = 0;
  logic pwm, pwm_n;
  int checks = 0, failures = 0;
  mhdpwm_ref ref_m;

  mhdpwm #(.NC(NC), .ND(ND)) dut (
    .clk(clk), .rst(rst), .duty(duty), .pwm(pwm), .pwm_n(pwm_n)
  );

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic high_time(input int word, input int expected);
    int highs;
    @(negedge clk);
    rst = 1;
    duty = (NC+ND)'(word);
    @(negedge clk);
    rst = 0;
    repeat (2 * M) @(negedge clk);   // settle
    highs = 0;
    for (int t = 0; t < 4 * M; t++) begin
      highs += pwm;
      checks++;
      if (pwm_n !== !pwm) failures++;
      @(negedge clk);
    end
    checks++;
    if (highs != 4 * expected) begin
      failures++;
      $display("FAIL duty=%b high %0d of %0d cycles, expected %0d", word, highs, 4 * M, 4 * expected);
    end
  endtask

  initial begin
    ref_m = new(NC, ND);
    high_time(32'h155, 11);
    high_time(32'h15f, 20);

    for (int n = 0; n < 120; n++) begin
      int word;
      word = (n < 64) ? n * 16 + n % 16 : int'($urandom_range((1 << (NC + ND)) - 1));
      if (n % 3 == 0) begin
        @(negedge clk);
        rst = 1;
        @(negedge clk);
        rst = 0;
        ref_m.reset();
      end
      duty = (NC+ND)'(word);
      for (int t = 0; t < 3 * M; t++) begin
        @(posedge clk);
        ref_m.step(word);
        @(negedge clk);
        checks++;
        if (pwm !== ref_m.q) begin
          failures++;
          $display("FAIL duty=%b t=%0d pwm=%0b expected %0b", word, t, pwm, ref_m.q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
