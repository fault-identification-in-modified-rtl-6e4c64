// Testbench for edge_detector: random input; the pulse must be high exactly
// in the cycles where the input is high and was low in the previous cycle.
module tb_edge_detector;
  logic clk = 0, rst = 1, sig = 0, pulse;
  int checks = 0, failures = 0, edges = 0;

  edge_detector dut (.clk(clk), .rst(rst), .sig(sig), .pulse(pulse));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit prev;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    prev = 0;
    for (int i = 0; i < 500; i++) begin
      sig = 1'($urandom_range(1));
      #1;
      checks++;
      if (pulse !== (sig && !prev)) begin
        failures++;
        $display("FAIL cycle %0d sig=%0b prev=%0b pulse=%0b", i, sig, prev, pulse);
      end
      if (sig && !prev) edges++;
      prev = sig;
      @(negedge clk);
    end
    checks++; if (edges == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
