// Testbench for mddpwm: every 5-bit duty value, several ring revolutions.
// With t cycles since reset the circulating 1 is in stage t mod 32, so
//   RESET_D when t mod 32 == d
//   SET_D   when t mod 32 == (32 - d) mod 32
module tb_mddpwm;
  localparam int ND = 5;
  localparam int W  = 1 << ND;
  logic clk = 0, rst = 1;
  logic [ND-1:0] duty_d = 0;
  logic set_d, reset_d;
  int checks = 0, failures = 0;

  mddpwm #(.ND(ND)) dut (
    .clk(clk), .rst(rst), .duty_d(duty_d), .set_d(set_d), .reset_d(reset_d)
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < W; d++) begin
      @(negedge clk);
      rst = 1;
      duty_d = ND'(d);
      @(negedge clk);
      rst = 0;
      for (int t = 0; t < 3 * W; t++) begin
        bit e_set, e_rst;
        e_rst = (t % W == d);
        e_set = (t % W == (W - d) % W);
        checks++;
        if (set_d !== e_set || reset_d !== e_rst) begin
          failures++;
          $display("FAIL d=%0d t=%0d set_d=%0b/%0b reset_d=%0b/%0b",
                   d, t, set_d, e_set, reset_d, e_rst);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
