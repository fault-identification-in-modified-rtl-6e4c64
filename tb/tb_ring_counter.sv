// Testbench for ring_counter: after reset the taps must be one-hot with the 1
// in stage (elapsed cycles mod 32), over several revolutions.
module tb_ring_counter;
  localparam int W = 32;
  logic clk = 0, rst = 1;
  logic [W-1:0] taps;
  int checks = 0, failures = 0;

  ring_counter #(.W(W)) dut (.clk(clk), .rst(rst), .taps(taps));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int i = 0; i < 4 * W; i++) begin
      checks++;
      if (taps !== (W'(1) << (i % W))) begin
        failures++;
        $display("FAIL cycle %0d taps=%h", i, taps);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
