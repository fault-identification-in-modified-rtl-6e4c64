// Testbench for pwm_counter: after reset the count must equal the number of
// elapsed cycles modulo 2^NC, i.e. wrap with a period of 2^NC cycles.
module tb_pwm_counter;
  localparam int NC = 5;
  logic clk = 0, rst = 1;
  logic [NC-1:0] count;
  int checks = 0, failures = 0;

  pwm_counter #(.NC(NC)) dut (.clk(clk), .rst(rst), .count(count));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int wraps = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    checks++; if (count !== 0) failures++;
    for (int i = 1; i <= 5 * (1 << NC); i++) begin
      @(negedge clk);
      checks++;
      if (count !== NC'(i % (1 << NC))) begin
        failures++;
        $display("FAIL cycle %0d count=%0d", i, count);
      end
      if (i % (1 << NC) == 0) wraps++;
    end
    checks++; if (wraps != 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
